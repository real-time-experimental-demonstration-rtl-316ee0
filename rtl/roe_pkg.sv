// roe_pkg: types and constants shared by the radio-over-Ethernet fronthaul.
//
// The Ethernet side of the design moves frames as a 64-bit stream, one
// beat per cycle of the 10G MAC clock (156.25 MHz), with the first byte of
// the frame in bits [7:0] of the first beat.  A beat carries a byte-enable
// mask and an end-of-frame flag; valid/ready travel beside the struct.
//
// Frame layout (offsets in bytes from the start of the MAC header):
//   0..5   destination MAC
//   6..11  source MAC
//   12..13 EtherType (RoE_ETHERTYPE)
//   14..17 timestamp, fraction of a second in units of 2^-32 s, MSB first
//   18..   compressed, replicated I/Q payload (PAYLOAD_BYTES bytes)
// The FCS, preamble and inter-frame gap belong to the MAC and are not
// produced here.  The field order after the EtherType and the EtherType
// value itself are this design's choice.
package roe_pkg;

  localparam int unsigned BEAT_BYTES = 8;
  localparam int unsigned HDR_BYTES  = 18;   // MAC header (14) + timestamp (4)

  // IEEE local experimental EtherType
  localparam logic [15:0] ROE_ETHERTYPE = 16'h88B5;

  localparam logic [47:0] CU_MAC = 48'h02_00_00_00_00_01;
  localparam logic [47:0] RU_MAC = 48'h02_00_00_00_00_02;

  typedef struct packed {
    logic [63:0] data;
    logic [7:0]  keep;
    logic        last;
  } beat_t;

  // One compressed complex sample: 8-bit I in [15:8], 8-bit Q in [7:0]
  typedef struct packed {
    logic [7:0] i;
    logic [7:0] q;
  } ciq_t;

  // One uncompressed complex baseband sample
  typedef struct packed {
    logic signed [15:0] i;
    logic signed [15:0] q;
  } iq16_t;

  // Byte n of a 48-bit MAC in wire order (byte 0 is sent first)
  function automatic logic [7:0] mac_byte(input logic [47:0] mac, input int unsigned n);
    return mac[8*(5-n) +: 8];
  endfunction

  // Modulo-2^32 "a is earlier than b" for timestamps that wrap each second
  function automatic logic ts_before(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] d;
    d = a - b;
    return d[31];
  endfunction

endpackage
