// scrambler: word-parallel IEEE 802.11 data scrambler, generator x^7 + x^4 + 1.
//
// Each accepted W-bit input word (bit 0 first in time) is XORed with the next W bits of
// the scrambling sequence s[n] = s[n-7] ^ s[n-4]. The sequence state is the last seven
// sequence bits; a W-bit step is unrolled so a whole word is scrambled per clock, as in
// the 16-bit parallel structure of the design (IN[15:0], OUT[15:0], SEL, MODE, ENA, VALID).
// sel = 0 loads the 7-bit seed into the state (seed[i] = register stage x(i+1), x7 is the
// oldest bit); sel = 1 lets the state run on. mode = 1 scrambles, mode = 0 passes the data
// through unchanged. The output is registered: one cycle latency, valid/ready handshake,
// one word per clock when the consumer is ready. The handshake and the meaning given to
// MODE are this design's choices.
module scrambler #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mode,
  input  logic         sel,
  input  logic [6:0]   seed,
  input  logic         ena,       // input word valid
  output logic         in_ready,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic         valid,
  input  logic         out_ready
);

  logic [6:0]   state;       // state[i] = x(i+1); x1 is the most recent sequence bit
  logic [6:0]   nstate;
  logic [W-1:0] seq;

  always_comb begin
    logic [6:0] s;
    s = state;
    for (int n = 0; n < W; n++) begin
      seq[n] = s[6] ^ s[3];
      s = {s[5:0], seq[n]};
    end
    nstate = s;
  end

  assign in_ready = !valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '1;
      valid <= 1'b0;
      dout  <= '0;
    end else if (!sel) begin
      state <= seed;
      valid <= 1'b0;
    end else begin
      if (out_ready) valid <= 1'b0;
      if (ena && in_ready) begin
        dout  <= mode ? (din ^ seq) : din;
        valid <= 1'b1;
        state <= nstate;
      end
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || !sel)
                           valid && !out_ready |=> valid && $stable(dout));

endmodule
