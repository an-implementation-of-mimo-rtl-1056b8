// converter: 16-bit to 8-bit width conversion and OFDM symbol framing.
//
// Scrambled 16-bit DATA-field words (bit 0 first) enter a 24-bit bit buffer. Chunks of up
// to 8 bits leave it for the 8-bit parallel convolutional encoder; a chunk never crosses an
// OFDM symbol boundary, so the last chunk of a symbol carries N_DBPS mod 8 bits (nbits).
// The six tail bits that follow the PSDU are forced to zero here, after scrambling, so
// that the encoder returns to the zero state. Framing continues with scrambled pad bits to
// the end of the symbol that holds the tail; with STBC it continues to an even number of
// symbols. The last chunk carries last = 1 and stop is raised; further input is refused
// until the next init. Valid/ready on both sides, registered output, one chunk per clock.
// Placing tail zeroing and framing in this block is this design's choice.
module converter
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [10:0] sym_bits,
  input  logic [19:0] tail_at,   // index of the first tail bit
  input  logic        stbc,
  input  logic [15:0] din,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [7:0]  dout,
  output logic [3:0]  nbits,
  output logic        sos,
  output logic        eos,
  output logic        last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        stop
);

  logic [23:0] bbuf;
  logic [4:0]  cnt;      // valid bits in bbuf
  logic [19:0] pos;      // DATA-field index of bbuf[0]
  logic [10:0] symbit;   // bits of the current symbol already emitted
  logic        symodd;   // current symbol index is odd
  logic        active;

  logic [10:0] rem;
  logic [3:0]  need;
  logic        fire, take;
  logic [7:0]  chunk;
  logic        ceos, clast;

  always_comb begin
    rem  = sym_bits - symbit;
    need = (rem >= 11'd8) ? 4'd8 : rem[3:0];
    fire = active && (!out_valid || out_ready) && (cnt >= {1'b0, need});
    for (int i = 0; i < 8; i++) begin
      logic [19:0] p;
      p = pos + 20'(i);
      chunk[i] = (i < need) && bbuf[i] && !((p >= tail_at) && (p < tail_at + 20'd6));
    end
    ceos  = (symbit + 11'(need)) == sym_bits;
    clast = ceos && ((pos + 20'(need)) >= (tail_at + 20'd6)) && (!stbc || symodd);
  end

  assign in_ready = active && !(fire && clast) &&
                    ((cnt - (fire ? {1'b0, need} : 5'd0)) <= 5'd8);
  assign take = in_valid && in_ready;

  // Buffer contents after this cycle's output and input
  logic [23:0] nbuf;
  logic [4:0]  ncnt;
  always_comb begin
    nbuf = bbuf; ncnt = cnt;
    if (fire) begin nbuf = nbuf >> need; ncnt = ncnt - {1'b0, need}; end
    if (take) begin nbuf = nbuf | (24'(din) << ncnt); ncnt = ncnt + 5'd16; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bbuf <= '0; cnt <= '0; pos <= '0; symbit <= '0; symodd <= 1'b0; active <= 1'b0;
      dout <= '0; nbits <= '0; sos <= 1'b0; eos <= 1'b0; last <= 1'b0; out_valid <= 1'b0;
      stop <= 1'b0;
    end else if (init) begin
      bbuf <= '0; cnt <= '0; pos <= '0; symbit <= '0; symodd <= 1'b0; active <= 1'b1;
      out_valid <= 1'b0; stop <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (fire) begin
        dout <= chunk; nbits <= need; sos <= (symbit == 0); eos <= ceos; last <= clast;
        out_valid <= 1'b1;
        pos <= pos + 20'(need);
        if (ceos) begin symbit <= '0; symodd <= !symodd; end
        else symbit <= symbit + 11'(need);
        if (clast) begin active <= 1'b0; stop <= 1'b1; end
      end
      bbuf <= nbuf; cnt <= ncnt;
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
                           out_valid && !out_ready |=> out_valid && $stable({dout, nbits, sos, eos, last}));

endmodule
