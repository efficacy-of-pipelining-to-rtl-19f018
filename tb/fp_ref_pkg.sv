// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Works with exact wide integers rather than with the units' datapath: an
// operand (sign, biased exponent e, fraction f) of a format with we exponent
// and wf fraction bits stands for (-1)^s * (2^wf + f) * 2^(e - bias - wf).
// A sum is formed exactly by lining both significands up on the smaller
// exponent in a BW-bit integer, a product by multiplying the significands;
// the exact value is then rounded once to nearest, ties to even. The result
// exponent field is the biased exponent modulo 2^we (the units do not flag
// range overflow), and an exact zero sum is the all-zero word. Words are
// passed right-aligned in 32 bits.
package fp_ref_pkg;

  localparam int BW = 320;   // holds 24 + 255 bits of aligned FP32 significand
  typedef logic [BW-1:0] big_t;

  // What happened on the way to a result, for coverage counts.
  typedef struct {
    int   e;      // biased result exponent before the modulo
    logic rup;    // rounding incremented the significand
    logic tie;    // the discarded bits were exactly one half
    logic zero;   // exact zero result
  } ref_info_t;

  function automatic int unsigned fbias(input int we);
    return (1 << (we - 1)) - 1;
  endfunction

  // Round the exact magnitude m * 2^(ebase - bias - wf) and pack it.
  function automatic logic [31:0] round_pack(input int we, input int wf,
                                             input logic sgn, input big_t m,
                                             input int ebase, output ref_info_t info);
    int          p;
    int          e;
    big_t        q, rem, half;
    logic [31:0] w;
    p = -1;
    for (int i = 0; i < BW; i++) if (m[i]) p = i;
    info = '{e: 0, rup: 1'b0, tie: 1'b0, zero: 1'b1};
    if (p < 0) return 32'd0;
    info.zero = 1'b0;
    e = ebase + p - wf;
    if (p > wf) begin
      q    = m >> (p - wf);
      rem  = m & ((big_t'(1) << (p - wf)) - 1);
      half = big_t'(1) << (p - wf - 1);
      info.tie = (rem == half);
      if (rem > half || (rem == half && q[0])) begin
        q = q + 1;
        info.rup = 1'b1;
      end
      if (q[wf+1]) begin
        q = q >> 1;
        e = e + 1;
      end
    end else begin
      q = m << (wf - p);
    end
    info.e = e;
    w = '0;
    for (int i = 0; i < wf; i++) w[i] = q[i];
    for (int i = 0; i < we; i++) w[wf+i] = e[i];   // two's complement: modulo 2^we
    w[we+wf] = sgn;
    return w;
  endfunction

  function automatic void unpack(input int we, input int wf, input logic [31:0] x,
                                 output logic s, output int e, output big_t m);
    s = x[we+wf];
    e = int'((x >> wf) & ((32'd1 << we) - 1));
    m = '0;
    for (int i = 0; i < wf; i++) m[i] = x[i];
    m[wf] = 1'b1;
  endfunction

  function automatic logic [31:0] ref_add(input int we, input int wf,
                                          input logic [31:0] a, input logic [31:0] b,
                                          output ref_info_t info);
    logic s_a, s_b, s_r;
    int   e_a, e_b, emin;
    big_t m_a, m_b, m_r;
    unpack(we, wf, a, s_a, e_a, m_a);
    unpack(we, wf, b, s_b, e_b, m_b);
    emin = (e_a < e_b) ? e_a : e_b;
    m_a  = m_a << (e_a - emin);
    m_b  = m_b << (e_b - emin);
    if (s_a == s_b) begin
      m_r = m_a + m_b;
      s_r = s_a;
    end else if (m_a >= m_b) begin
      m_r = m_a - m_b;
      s_r = s_a;
    end else begin
      m_r = m_b - m_a;
      s_r = s_b;
    end
    return round_pack(we, wf, s_r, m_r, emin, info);
  endfunction

  function automatic logic [31:0] ref_mul(input int we, input int wf,
                                          input logic [31:0] a, input logic [31:0] b,
                                          output ref_info_t info);
    logic s_a, s_b;
    int   e_a, e_b;
    big_t m_a, m_b;
    unpack(we, wf, a, s_a, e_a, m_a);
    unpack(we, wf, b, s_b, e_b, m_b);
    return round_pack(we, wf, s_a ^ s_b, m_a * m_b, e_a + e_b - int'(fbias(we)) - wf,
                      info);
  endfunction

  // Operand pairs in several classes, so that alignment, carry, cancellation,
  // ties and exponent wrap-around all occur often. Words are right-aligned.
  function automatic void gen_pair(input int we, input int wf, input logic is_mul,
                                   output logic [31:0] a, output logic [31:0] b);
    logic [31:0] fmask, emask;
    int          cls, ea, eb, d;
    fmask = (32'd1 << wf) - 1;
    emask = (32'd1 << we) - 1;
    a = $urandom & ((32'd1 << (1 + we + wf)) - 1);
    b = $urandom & ((32'd1 << (1 + we + wf)) - 1);
    cls = int'($urandom_range(0, 5));
    ea  = int'((a >> wf) & emask);
    case (cls)
      1: begin   // close exponents: partial alignment, carries, sticky bits
        d  = int'($urandom_range(0, wf + 5));
        eb = (ea >= d) ? ea - d : ea + d;
        b  = (b & ~(emask << wf)) | ((32'(eb) & emask) << wf);
      end
      2: begin   // near cancellation: opposite signs, same or adjacent exponent
        eb = ea + int'($urandom_range(0, 2)) - 1;
        b  = (a & ~(emask << wf)) ^ (32'd1 << (we + wf));
        b  = b | ((32'(eb) & emask) << wf);
        b  = b ^ ($urandom & fmask & ((32'd1 << $urandom_range(0, wf)) - 1));
      end
      3: b = a ^ (32'd1 << (we + wf));            // exact cancellation
      4: b = (b & ~fmask) | (32'd1 << $urandom_range(0, wf - 1));  // sparse fraction: ties
      5: if (is_mul) begin                        // exponents that keep the product in range
        ea = int'($urandom_range(fbias(we) / 2 + 1, fbias(we) + fbias(we) / 2));
        eb = 2 * int'(fbias(we)) - ea;
        a  = (a & ~(emask << wf)) | ((32'(ea) & emask) << wf);
        b  = (b & ~(emask << wf)) | ((32'(eb) & emask) << wf);
      end
      default: ;                                  // fully random words
    endcase
  endfunction

endpackage
