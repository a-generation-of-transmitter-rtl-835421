// stbc_ref_pkg -- reference model for the testbenches of the 16-PSK Alamouti
// transmitter, written from the Alamouti code and the 16-PSK definition alone
// (floating point, no table), independently of the RTL.
//
//   symbol k  ->  carrier starting at k * 22.5 deg, advancing 11.25 deg/sample
//   x(n) = A * exp(j*theta), theta = 2*pi*(2k + n)/32, A = 2^(W-1) - 1
//   antenna 1 sends s1 in slot 1 and -conj(s2) in slot 2
//   antenna 2 sends s2 in slot 1 and  conj(s1) in slot 2
package stbc_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int amp(int w);
    return (1 << (w - 1)) - 1;
  endfunction

  // I and Q of symbol k at sample n, before any Alamouti operation.
  function automatic int ref_cos(int k, int n, int w);
    return int'(real'(amp(w)) * $cos(2.0 * PI * real'(2 * k + n) / 32.0));
  endfunction
  function automatic int ref_sin(int k, int n, int w);
    return int'(real'(amp(w)) * $sin(2.0 * PI * real'(2 * k + n) / 32.0));
  endfunction

  // Sample sent by antenna `ch` (1/2) in slot `slot` (1/2), sample n, for byte d.
  function automatic void ref_iq(int d, int ch, int slot, int n, int w,
                                 output int i, output int q);
    int s1, s2, c, s;
    s1 = (d >> 4) & 15;
    s2 = d & 15;
    if (ch == 1 && slot == 1) begin        //  s1
      i = ref_cos(s1, n, w);  q = ref_sin(s1, n, w);
    end else if (ch == 1) begin            // -conj(s2) = -(c - js) = -c + js
      c = ref_cos(s2, n, w);  s = ref_sin(s2, n, w);
      i = -c;  q = s;
    end else if (slot == 1) begin          //  s2
      i = ref_cos(s2, n, w);  q = ref_sin(s2, n, w);
    end else begin                         //  conj(s1) = c - js
      c = ref_cos(s1, n, w);  s = ref_sin(s1, n, w);
      i = c;  q = -s;
    end
  endfunction

endpackage
