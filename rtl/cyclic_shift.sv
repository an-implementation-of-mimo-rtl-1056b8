// cyclic_shift: cyclic shift diversity for the second transmit chain, in frequency domain.
//
// IEEE 802.11n delays the HT portion of the second transmit chain cyclically by
// T_CS = -400 ns. Before the IFFT this is a phase ramp: subcarrier k is multiplied by
// exp(-j*2*pi*k*dF*T_CS) = exp(j*pi*k/4) at both 20 MHz (-8 samples of 64) and 40 MHz
// (-16 samples of 128). The rotation is k mod 8 steps of 45 degrees: a swap/negation for the
// quarter turns and, for odd steps, a multiplication by (1+j)/sqrt(2) with the constant
// 23170/32768, rounded to nearest. Chain 0 passes unchanged; chain 1 is rotated only when
// enable is set (two transmit chains). Registered, valid/ready, one subcarrier per clock.
// Doing the shift before the IFFT follows the block order of the design; the arithmetic is
// this design's.
module cyclic_shift
  import tx_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              enable,
  input  cplx_t             y0,
  input  cplx_t             y1,
  input  logic signed [7:0] k,
  input  logic              eos_in,
  input  logic              last_in,
  input  logic              in_valid,
  output logic              in_ready,
  output cplx_t             z0,
  output cplx_t             z1,
  output logic              eos,
  output logic              last,
  output logic              out_valid,
  input  logic              out_ready
);

  localparam int signed C45 = 23170;   // round(2^15 / sqrt(2))

  function automatic logic signed [SW-1:0] scale45(input logic signed [SW:0] v);
    logic signed [SW+16:0] p;
    p = (SW+17)'(v) * (SW+17)'(C45) + (SW+17)'(16384);
    return SW'(p >>> 15);
  endfunction

  cplx_t r;
  always_comb begin
    cplx_t h;
    logic [2:0] m;
    m = k[2:0];                      // k mod 8
    h = y1;
    if (m[0]) begin                  // multiply by (1 + j)/sqrt(2)
      h.re = scale45((SW+1)'(y1.re) - (SW+1)'(y1.im));
      h.im = scale45((SW+1)'(y1.re) + (SW+1)'(y1.im));
    end
    case (m[2:1])                    // then by j^(m div 2)
      2'd0: r = h;
      2'd1: begin r.re = -h.im; r.im = h.re;  end
      2'd2: begin r.re = -h.re; r.im = -h.im; end
      default: begin r.re = h.im;  r.im = -h.re; end
    endcase
    if (!enable) r = y1;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z0 <= '0; z1 <= '0; eos <= 1'b0; last <= 1'b0; out_valid <= 1'b0;
    end else if (init) begin
      out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        z0 <= y0; z1 <= r; eos <= eos_in; last <= last_in; out_valid <= 1'b1;
      end
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
                           out_valid && !out_ready |=> out_valid && $stable({z0, z1, eos, last}));

endmodule
