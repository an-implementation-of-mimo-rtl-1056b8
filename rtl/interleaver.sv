// interleaver: stream parser and IEEE 802.11n HT block interleaver, 20 and 40 MHz.
//
// Write side: each clock takes up to 16 punctured coded bits (ccnt) with a running index c
// inside the OFDM symbol. With two spatial streams the parser deals blocks of
// s = max(1, N_BPSCS/2) bits to the streams in turn: stream = (c/s) mod 2,
// k = (c/(2s))*s + c mod s. Every bit is then written straight to its interleaved position:
//   i = N_ROW*(k mod N_COL) + floor(k/N_COL)                  (first permutation)
//   j = i - (q mod s) + ((q - a) mod s), a = k mod N_COL, q = floor(k/N_COL)
//                                                               (second permutation; this is
//        the standard's s*floor(i/s) + (i + N_CBPSS - floor(N_COL*i/N_CBPSS)) mod s rewritten
//        with N_CBPSS = N_COL*N_ROW)
//   r = (j - 2*N_ROT*N_BPSCS) mod N_CBPSS for the second stream (frequency rotation)
// with N_COL/N_ROW/N_ROT = 13/4*N_BPSCS/11 (20 MHz) or 18/6*N_BPSCS/29 (40 MHz).
// The memory is organised by subcarrier: one 6-bit word holds the N_BPSCS bits of one
// subcarrier (bit position r mod N_BPSCS), 128 words per stream, i.e. two 64x6 memories per
// stream per symbol buffer. Two symbol buffers (ping-pong) let one symbol be written while
// the previous one is read.
// Read side: one subcarrier of both streams per clock (d0, d1), in IFFT bin order: the
// upper half of the data subcarriers first, then the lower half. sos/eos mark the first
// and last subcarrier of a symbol, last the final symbol of the packet.
module interleaver
  import tx_pkg::*;
#(
  parameter int NBUF = 2,     // symbol buffers
  parameter int NSC  = 128    // subcarrier words per stream per buffer
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [2:0]  bpscs,   // N_BPSCS: 1, 2, 4, 6
  input  logic        bw40,
  input  logic        nss2,    // two spatial streams
  input  logic [15:0] cbits,
  input  logic [4:0]  ccnt,
  input  logic        eos_in,
  input  logic        last_in,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [5:0]  d0,
  output logic [5:0]  d1,
  output logic        sos,
  output logic        eos,
  output logic        last,
  output logic        out_valid,
  input  logic        out_ready
);

  localparam int BW = (NBUF > 1) ? $clog2(NBUF) : 1;

  logic [5:0] mem [NBUF][2][NSC];
  logic [NBUF-1:0] full;
  logic [NBUF-1:0] blast;      // buffer holds the last symbol
  logic [BW-1:0]   wb, rb;
  logic [10:0]     cidx;
  logic [6:0]      rcnt;

  // Mode constants
  logic [2:0]  s;
  logic [4:0]  ncol;
  logic [9:0]  ncbpss;
  logic [9:0]  rot;
  logic [6:0]  nsd, half;
  always_comb begin
    s      = (bpscs <= 3'd2) ? 3'd1 : {1'b0, bpscs[2:1]};
    ncol   = bw40 ? 5'd18 : 5'd13;
    nsd    = n_sd(bw40);
    half   = {1'b0, nsd[6:1]};
    ncbpss = 10'(nsd) * 10'(bpscs);
    rot    = (bw40 ? 10'd58 : 10'd22) * 10'(bpscs);
  end

  function automatic logic [1:0] mod_s(input logic [10:0] x, input logic [2:0] sv);
    case (sv)
      3'd2:    return {1'b0, x[0]};
      3'd3:    return 2'(x % 11'd3);
      default: return 2'd0;
    endcase
  endfunction

  // Write address of coded bit c: stream, subcarrier word and bit
  typedef struct packed {
    logic       strm;
    logic [6:0] sc;
    logic [2:0] bitp;
  } waddr_t;

  function automatic waddr_t waddr(input logic [10:0] c);
    waddr_t w;
    logic [10:0] blk, k, a, q, i, j, r;
    logic [1:0]  cm;
    if (nss2) begin
      case (s)
        3'd2:    begin blk = c >> 1;      cm = {1'b0, c[0]}; end
        3'd3:    begin blk = c / 11'd3;   cm = 2'(c % 11'd3); end
        default: begin blk = c;           cm = 2'd0; end
      endcase
      w.strm = blk[0];
      k = (blk >> 1) * 11'(s) + 11'(cm);
    end else begin
      w.strm = 1'b0;
      k = c;
    end
    a = k % 11'(ncol);
    q = k / 11'(ncol);
    i = q + a * 11'(bpscs) * (bw40 ? 11'd6 : 11'd4);
    j = i - 11'(mod_s(q, s)) + 11'(mod_s(q + 11'd18 - a, s));
    if (w.strm) r = (j >= 11'(rot)) ? j - 11'(rot) : j + 11'(ncbpss) - 11'(rot);
    else        r = j;
    w.sc   = 7'(r / 11'(bpscs));
    w.bitp = 3'(r % 11'(bpscs));
    return w;
  endfunction

  assign in_ready = !full[wb];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      for (int m = 0; m < 16; m++) begin
        if (m < ccnt) begin
          waddr_t w;
          w = waddr(cidx + 11'(m));
          mem[wb][w.strm][w.sc][w.bitp] <= cbits[m];
        end
      end
    end
  end

  logic rfire;
  assign rfire = full[rb] && (!out_valid || out_ready);

  // Subcarrier read this cycle: upper half of the data subcarriers first
  logic [6:0] rsc;
  assign rsc = (rcnt < half) ? rcnt + half : rcnt - half;

  // Buffer-full flags after this cycle's write and read
  logic [NBUF-1:0] nfull;
  always_comb begin
    nfull = full;
    if (in_valid && in_ready && eos_in) nfull[wb] = 1'b1;
    if (rfire && rcnt == nsd - 7'd1) nfull[rb] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; blast <= '0; wb <= '0; rb <= '0; cidx <= '0; rcnt <= '0;
      d0 <= '0; d1 <= '0; sos <= 1'b0; eos <= 1'b0; last <= 1'b0; out_valid <= 1'b0;
    end else if (init) begin
      full <= '0; blast <= '0; wb <= '0; rb <= '0; cidx <= '0; rcnt <= '0; out_valid <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        if (eos_in) begin
          blast[wb] <= last_in;
          wb <= (int'(wb) == NBUF - 1) ? '0 : wb + 1'b1;
          cidx <= '0;
        end else begin
          cidx <= cidx + 11'(ccnt);
        end
      end
      if (out_ready) out_valid <= 1'b0;
      if (rfire) begin
        d0 <= mem[rb][0][rsc];
        d1 <= mem[rb][1][rsc];
        sos <= (rcnt == 0);
        eos <= (rcnt == nsd - 7'd1);
        last <= blast[rb] && (rcnt == nsd - 7'd1);
        out_valid <= 1'b1;
        if (rcnt == nsd - 7'd1) begin
          rcnt <= '0;
          rb <= (int'(rb) == NBUF - 1) ? '0 : rb + 1'b1;
        end else begin
          rcnt <= rcnt + 7'd1;
        end
      end
      full <= nfull;
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
                           out_valid && !out_ready |=> out_valid && $stable({d0, d1, sos, eos, last}));

endmodule
