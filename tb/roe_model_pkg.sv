// roe_model_pkg: reference models used by the unit, link and end-to-end
// testbenches.  They restate the arithmetic of the datapath in plain
// integer form, written apart from the RTL: fs/4 mixing with boxcar
// decimation, the 8-bit segment code and its reconstruction, and the fs/4
// up-conversion.
package roe_model_pkg;

  // 8-bit code of a 16-bit sample: sign, 3-bit segment, 4-bit mantissa
  function automatic int code8(int x);
    int s, mag, e, m, p;
    s = x < 0; mag = s ? -x : x;
    if (mag > 32767) mag = 32767;
    if (mag < 256) begin e = 0; m = mag / 16; end
    else begin p = $clog2(mag + 1) - 1; e = p - 7; m = (mag / (1 << (e + 3))) % 16; end
    return s * 128 + e * 16 + m;
  endfunction

  function automatic int expand8(int c);
    int e, m, mag;
    e = (c / 16) % 8; m = c % 16;
    mag = (e == 0) ? 16 * m + 8 : (16 + m) * (1 << (e + 3)) + (1 << (e + 2));
    return (c >= 128) ? -mag : mag;
  endfunction

  function automatic int neg_sat(int v);
    return (v == -32768) ? 32767 : -v;
  endfunction

  // DAC sample for baseband (i,q) at up-converter phase ph
  function automatic int upmix(int i, int q, int ph);
    case (ph % 4)
      0: return i;
      1: return neg_sat(q);
      2: return neg_sat(i);
      default: return q;
    endcase
  endfunction

  // fs/4 down-converter with DEC-sample boxcar and >>> SHIFT, saturated
  class ddc_model;
    int dec, shift, n = 0, ai = 0, aq = 0;
    function new(int dec_ = 6, int shift_ = 2); dec = dec_; shift = shift_; endfunction
    static function int sat(int v, int sh);
      v = v >>> sh;
      if (v > 32767) return 32767;
      if (v < -32768) return -32768;
      return v;
    endfunction
    // push one ADC sample; returns 1 and the baseband sample when one is complete
    function bit push(int x, output int i, output int q);
      case (n % 4) 0: ai += x; 1: aq -= x; 2: ai -= x; default: aq += x; endcase
      n++;
      if (n % dec == 0) begin
        i = sat(ai, shift); q = sat(aq, shift); ai = 0; aq = 0;
        return 1;
      end
      i = 0; q = 0;
      return 0;
    endfunction
  endclass

endpackage
