// conv_enc: 8-bit parallel rate-1/2 convolutional encoder with puncturing.
//
// Up to 8 data bits per clock (nbits, bit 0 first) pass through the K = 7 code of
// IEEE 802.11, generators g0 = 133 and g1 = 171 (octal): A = u(n)^u(n-2)^u(n-3)^u(n-5)^u(n-6),
// B = u(n)^u(n-1)^u(n-2)^u(n-3)^u(n-6). The six previous input bits are the state, as in the
// 8-bit input register plus 6-bit state window of the design, giving 16 mother-code bits
// per clock. Puncturing (A0 B0 A1 | A0 B0 A1 B2 | A0 B0 A1 B2 A3 B4 for rates 2/3, 3/4, 5/6)
// packs the kept bits at the bottom of cbits with their count in ccnt. The puncturing
// phase restarts at every OFDM symbol (sos), which is exact because N_DBPS is a multiple
// of the puncturing period; the code state runs across symbols and is cleared by init.
// Registered output, valid/ready, one input chunk per clock.
module conv_enc
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  rate_e       rate,
  input  logic [7:0]  din,
  input  logic [3:0]  nbits,
  input  logic        sos,
  input  logic        eos_in,
  input  logic        last_in,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [15:0] cbits,
  output logic [4:0]  ccnt,
  output logic        eos,
  output logic        last,
  output logic        out_valid,
  input  logic        out_ready
);

  logic [5:0]  st;     // st[0] = u(n-1) ... st[5] = u(n-6)
  logic [2:0]  ph;     // puncturing phase

  logic [5:0]  nst;
  logic [2:0]  nph;
  logic [15:0] ob;
  logic [4:0]  oc;

  always_comb begin
    logic [5:0] s;
    logic [2:0] p;
    logic a, b, ka, kb;
    s = st; p = sos ? 3'd0 : ph;
    ob = '0; oc = '0;
    for (int i = 0; i < 8; i++) begin
      if (i < nbits) begin
        a = din[i] ^ s[1] ^ s[2] ^ s[4] ^ s[5];
        b = din[i] ^ s[0] ^ s[1] ^ s[2] ^ s[5];
        case (rate)
          R12: begin ka = 1'b1; kb = 1'b1; end
          R23: begin ka = 1'b1; kb = (p == 0); end
          R34: begin ka = (p != 2); kb = (p != 1); end
          default: begin ka = (p == 0) || (p == 1) || (p == 3); kb = (p != 1) && (p != 3); end
        endcase
        if (ka) begin ob[oc[3:0]] = a; oc = oc + 5'd1; end
        if (kb) begin ob[oc[3:0]] = b; oc = oc + 5'd1; end
        case (rate)
          R12: p = 3'd0;
          R23: p = (p == 3'd1) ? 3'd0 : p + 3'd1;
          R34: p = (p == 3'd2) ? 3'd0 : p + 3'd1;
          default: p = (p == 3'd4) ? 3'd0 : p + 3'd1;
        endcase
        s = {s[4:0], din[i]};
      end
    end
    nst = s; nph = p;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= '0; ph <= '0; cbits <= '0; ccnt <= '0; eos <= 1'b0; last <= 1'b0; out_valid <= 1'b0;
    end else if (init) begin
      st <= '0; ph <= '0; out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        st <= nst; ph <= nph;
        cbits <= ob; ccnt <= oc; eos <= eos_in; last <= last_in; out_valid <= 1'b1;
      end
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
                           out_valid && !out_ready |=> out_valid && $stable({cbits, ccnt, eos, last}));

endmodule
