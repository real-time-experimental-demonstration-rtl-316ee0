// duc_fs4: digital up-converter from baseband I/Q back to the real digital
// IF that drives the DAC.
//
// Samples are taken from a show-ahead FIFO (filled from the Ethernet side)
// at one every INTERP DAC clocks and held for INTERP clocks (zero-order-hold
// interpolation back to the converter rate).  The held sample is mixed up
// to a quarter of the DAC rate with e^{+j*pi*n/2}: the real output is I,
// -Q, -I, Q on successive clocks.  Playout starts START_DELAY clocks after
// the first sample arrives, which leaves room for the jitter of frame
// release; if the FIFO is empty when a sample is due the block counts an
// underflow, outputs zero and waits for data again.
// Interface: src_empty/src_data/src_pop (show-ahead FIFO), dac_valid high
// while playing, dac_sample the 16-bit IF sample.  The interpolation filter,
// the fs/4 IF and the start-up rule are this design's choices; the document
// says only that the data are recovered to digital IF before the DAC.
module duc_fs4
  import roe_pkg::*;
#(
  parameter int unsigned INTERP      = 6,
  parameter int unsigned START_DELAY = 96
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               src_empty,
  input  iq16_t              src_data,
  output logic               src_pop,
  output logic               dac_valid,
  output logic signed [15:0] dac_sample,
  output logic [31:0]        underflows,
  output logic [31:0]        samples_played
);
  localparam int unsigned CW = $clog2(INTERP);
  localparam int unsigned DW = $clog2(START_DELAY + 1);

  typedef enum logic [1:0] {IDLE, WAIT, PLAY} state_t;
  state_t        state;
  logic [DW-1:0] wait_cnt;
  logic [CW-1:0] cnt;
  logic [1:0]    phase;
  iq16_t         hold;
  logic          due;

  assign due     = (state == PLAY) && (cnt == '0);
  assign src_pop = due && !src_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= IDLE;
      wait_cnt       <= '0;
      cnt            <= '0;
      phase          <= '0;
      hold           <= '0;
      dac_valid      <= 1'b0;
      dac_sample     <= '0;
      underflows     <= '0;
      samples_played <= '0;
    end else begin
      unique case (state)
        IDLE: if (!src_empty) begin
          state    <= WAIT;
          wait_cnt <= DW'(START_DELAY);
        end
        WAIT: begin
          if (wait_cnt == '0) begin
            state <= PLAY;
            cnt   <= '0;
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        PLAY: begin
          cnt <= (cnt == CW'(INTERP - 1)) ? '0 : cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase

      // output register: mix the sample in use this clock
      dac_valid <= 1'b0;
      if (due) begin
        if (src_empty) begin
          state      <= IDLE;
          underflows <= underflows + 1'b1;
          hold       <= '0;
          dac_sample <= '0;
        end else begin
          hold           <= src_data;
          samples_played <= samples_played + 1'b1;
          dac_valid      <= 1'b1;
          phase          <= phase + 2'd1;
          dac_sample     <= mix(src_data, phase);
        end
      end else if (state == PLAY) begin
        dac_valid  <= 1'b1;
        phase      <= phase + 2'd1;
        dac_sample <= mix(hold, phase);
      end else begin
        dac_sample <= '0;
      end
    end
  end

  function automatic logic signed [15:0] neg_sat(input logic signed [15:0] v);
    return (v == 16'sh8000) ? 16'sh7fff : -v;
  endfunction

  function automatic logic signed [15:0] mix(input iq16_t s, input logic [1:0] ph);
    unique case (ph)
      2'd0:    return s.i;
      2'd1:    return neg_sat(s.q);
      2'd2:    return neg_sat(s.i);
      default: return s.q;
    endcase
  endfunction
endmodule
