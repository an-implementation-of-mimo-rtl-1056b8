// mimo_enc: spatial encoding (SISO, SDM, Alamouti STBC) and pilot insertion.
//
// Output is one occupied subcarrier of both transmit chains per clock, in IFFT bin order
// (k = 1..28, -28..-1 at 20 MHz; k = 2..58, -58..-2 at 40 MHz), with k on kout. At pilot
// subcarriers the pilot from pilot_gen is sent and no input is taken; elsewhere one mapped
// data subcarrier is consumed.
//  - SISO / SDM: chain 0 carries stream 0, chain 1 carries stream 1 (zero in SISO).
//  - STBC (one spatial stream, two space-time streams): symbols are taken in pairs
//    (2m, 2m+1). Chain 0 sends d(2m) then d(2m+1); chain 1 sends -conj(d(2m+1)) then
//    conj(d(2m)). Symbol 2m is stored (buffer A) while it arrives, with no output; while
//    2m+1 arrives it is stored (buffer B) and output symbol 2m is sent; then output symbol
//    2m+1 is sent from the buffers with the input stalled.
// Pilots use the two-stream pattern in SDM and STBC and the one-stream pattern in SISO.
// Registered output, valid/ready. The spatial encoding rules are those of IEEE 802.11n;
// the buffering schedule is this design's choice.
module mimo_enc
  import tx_pkg::*;
#(
  parameter int NSD_MAX = 108
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              bw40,
  input  logic              nss2,
  input  logic              stbc,
  input  cplx_t             x0,
  input  cplx_t             x1,
  input  logic              last_in,
  input  logic              in_valid,
  output logic              in_ready,
  // pilot generator
  output logic [2:0]        pidx,
  output logic              next_sym,
  input  logic              pneg0,
  input  logic              pneg1,
  output cplx_t             y0,
  output cplx_t             y1,
  output logic signed [7:0] kout,
  output logic              sos,
  output logic              eos,
  output logic              last,
  output logic              out_valid,
  input  logic              out_ready
);

  typedef enum logic [1:0] {PH_DIRECT, PH_FILL, PH_EVEN, PH_ODD} ph_e;

  cplx_t bufa [NSD_MAX];
  cplx_t bufb [NSD_MAX];

  ph_e        ph;
  logic [6:0] pos;      // output slot within the symbol
  logic [6:0] d;        // data subcarrier within the symbol
  logic       lastp;    // STBC pair holds the last symbol

  logic signed [7:0] k;
  logic pil, slot_free, fire, take, seos;
  logic [6:0] nocc, nsd;
  cplx_t pv0, pv1, o0, o1;

  always_comb begin
    nocc = n_occ(bw40);
    nsd  = n_sd(bw40);
    k    = k_of_pos(bw40, pos);
    pil  = is_pilot(bw40, k);
    pidx = pilot_idx(bw40, k);
    pv0.re = pneg0 ? -13'(ONE) : 13'(ONE); pv0.im = '0;
    pv1.re = pneg1 ? -13'(ONE) : 13'(ONE); pv1.im = '0;
    if (!(nss2 || stbc)) pv1 = '0;
    slot_free = !out_valid || out_ready;
    seos = (pos == nocc - 7'd1);
    case (ph)
      PH_FILL: begin fire = 1'b0; take = in_valid; end
      PH_ODD:  begin fire = slot_free; take = 1'b0; end
      default: begin
        fire    = slot_free && (pil || in_valid);
        take    = slot_free && !pil && in_valid;
      end
    endcase
    case (ph)
      PH_EVEN: begin o0 = bufa[d]; o1 = cneg(cconj(x0)); end
      PH_ODD:  begin o0 = bufb[d]; o1 = cconj(bufa[d]); end
      default: begin o0 = x0; o1 = nss2 ? x1 : '0; end
    endcase
    if (pil && ph != PH_FILL) begin o0 = pv0; o1 = pv1; end
    next_sym = fire && seos;
  end

  assign in_ready = take;

  always_ff @(posedge clk) begin
    if (take && (ph == PH_FILL)) bufa[d] <= x0;
    if (take && (ph == PH_EVEN)) bufb[d] <= x0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= PH_DIRECT; pos <= '0; d <= '0; lastp <= 1'b0;
      y0 <= '0; y1 <= '0; kout <= '0; sos <= 1'b0; eos <= 1'b0; last <= 1'b0; out_valid <= 1'b0;
    end else if (init) begin
      ph <= stbc ? PH_FILL : PH_DIRECT; pos <= '0; d <= '0; lastp <= 1'b0; out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (ph == PH_FILL) begin
        if (take) begin
          if (d == nsd - 7'd1) begin d <= '0; ph <= PH_EVEN; end
          else d <= d + 7'd1;
        end
      end else if (fire) begin
        y0 <= o0; y1 <= o1; kout <= k; out_valid <= 1'b1;
        sos <= (pos == 0); eos <= seos;
        if (!pil) d <= (d == nsd - 7'd1) ? '0 : d + 7'd1;
        if (ph == PH_EVEN && take && last_in) lastp <= 1'b1;
        case (ph)
          PH_DIRECT: last <= seos && (lastp || (take && last_in));
          PH_ODD:    last <= seos && lastp;
          default:   last <= 1'b0;
        endcase
        if (ph == PH_DIRECT && take && last_in) lastp <= 1'b1;
        if (seos) begin
          pos <= '0;
          if (ph == PH_EVEN) ph <= PH_ODD;
          else if (ph == PH_ODD) ph <= PH_FILL;
        end else begin
          pos <= pos + 7'd1;
        end
      end
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
                           out_valid && !out_ready |=> out_valid && $stable({y0, y1, kout, sos, eos, last}));

endmodule
