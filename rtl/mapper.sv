// mapper: Gray-coded constellation mapping for two spatial streams.
//
// Each clock maps one subcarrier word per stream (N_BPSCS bits, first bit in bit 0) to a
// complex point as in IEEE 802.11: BPSK b0 -> I; QPSK b0 -> I, b1 -> Q; 16-QAM b0b1 -> I,
// b2b3 -> Q; 64-QAM b0b1b2 -> I, b3b4b5 -> Q, with 0 -> negative, Gray order of levels and
// normalisation 1/sqrt(2), 1/sqrt(10), 1/sqrt(42) (levels in tx_pkg::axis_level,
// 1.0 = 2048). The mapping follows the standard; the fixed-point scale is this design's.
// Registered, valid/ready, one subcarrier per clock; sos/eos/last travel alongside.
module mapper
  import tx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [2:0] bpscs,
  input  logic [5:0] b0,
  input  logic [5:0] b1,
  input  logic       sos_in,
  input  logic       eos_in,
  input  logic       last_in,
  input  logic       in_valid,
  output logic       in_ready,
  output cplx_t      x0,
  output cplx_t      x1,
  output logic       sos,
  output logic       eos,
  output logic       last,
  output logic       out_valid,
  input  logic       out_ready
);

  function automatic cplx_t map1(input logic [5:0] b);
    cplx_t y;
    case (bpscs)
      3'd1: begin y.re = axis_level(2'd1, {2'b00, b[0]}, 1'b0); y.im = '0; end
      3'd2: begin y.re = axis_level(2'd1, {2'b00, b[0]}, 1'b1);
                  y.im = axis_level(2'd1, {2'b00, b[1]}, 1'b1); end
      3'd4: begin y.re = axis_level(2'd2, {1'b0, b[1], b[0]}, 1'b0);
                  y.im = axis_level(2'd2, {1'b0, b[3], b[2]}, 1'b0); end
      default: begin y.re = axis_level(2'd3, b[2:0], 1'b0);
                     y.im = axis_level(2'd3, b[5:3], 1'b0); end
    endcase
    return y;
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0 <= '0; x1 <= '0; sos <= 1'b0; eos <= 1'b0; last <= 1'b0; out_valid <= 1'b0;
    end else if (init) begin
      out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        x0 <= map1(b0); x1 <= map1(b1);
        sos <= sos_in; eos <= eos_in; last <= last_in; out_valid <= 1'b1;
      end
    end
  end

  // Handshake rule: an offered output stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
                           out_valid && !out_ready |=> out_valid && $stable({x0, x1, sos, eos, last}));

endmodule
