// mimo_tx_top: 2x2 MIMO-OFDM transmitter PHY modulator for IEEE 802.11n HT data.
//
// The datapath runs, in order: Tx controller (SERVICE + PSDU as 16-bit words) ->
// 16-bit parallel scrambler -> 16-to-8-bit converter (symbol framing, tail zeroing,
// padding) -> 8-bit parallel convolutional encoder with puncturing -> stream parser and
// interleaver (ping-pong subcarrier RAM) -> constellation mapper -> MIMO encoder
// (SISO / SDM / STBC) with pilot generator -> cyclic shift of chain 2 -> IFFT controller,
// whose outputs feed two external IFFTs (not part of this design). All stages are linked
// by valid/ready handshakes, so the pipeline stalls on its own where a stage has to wait
// (pilot and null bins, STBC pairing, a full interleaver).
// Interface: pulse start with the configuration on cfg_*; the design then reads
// cfg_length bytes on psdu_*, emits each OFDM symbol as N (64 or 128) bins on ifft1/ifft2
// with their enables, and pulses done after the last bin. busy is high in between.
// At the 40 MHz system clock a 40 MHz-channel symbol needs at most 135 clocks of the 160
// in 4 us, so the highest rate (MCS 15) is sustained.
module mimo_tx_top
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  cfg_mcs,
  input  logic        cfg_bw40,
  input  logic        cfg_stbc,
  input  logic [15:0] cfg_length,
  input  logic [6:0]  cfg_seed,
  input  logic [7:0]  psdu_data,
  input  logic        psdu_valid,
  output logic        psdu_ready,
  output logic signed [SW-1:0] ifft1_re,
  output logic signed [SW-1:0] ifft1_im,
  output logic        ifft1_en,
  output logic signed [SW-1:0] ifft2_re,
  output logic signed [SW-1:0] ifft2_im,
  output logic        ifft2_en,
  output logic        sym_start,
  output logic        busy,
  output logic        done
);

  tx_cfg_t cfg_in, cfg;
  logic    init;
  assign cfg_in = '{mcs: cfg_mcs, bw40: cfg_bw40, stbc: cfg_stbc & ~cfg_mcs[3],
                    length: cfg_length, seed: cfg_seed};

  // Tx controller -> scrambler
  logic [15:0] w_data;  logic w_valid, w_ready, stop;
  tx_ctrl u_ctrl (
    .clk, .rst_n, .start, .cfg_in, .cfg, .init, .busy, .done,
    .psdu_data, .psdu_valid, .psdu_ready,
    .word(w_data), .word_valid(w_valid), .word_ready(w_ready), .stop
  );

  // scrambler -> converter
  logic [15:0] s_data;  logic s_valid, s_ready;
  scrambler #(.W(16)) u_scr (
    .clk, .rst_n, .mode(1'b1), .sel(!init), .seed(cfg.seed),
    .ena(w_valid), .in_ready(w_ready), .din(w_data),
    .dout(s_data), .valid(s_valid), .out_ready(s_ready)
  );

  // converter -> encoder
  logic [7:0] c_data; logic [3:0] c_n; logic c_sos, c_eos, c_last, c_valid, c_ready;
  converter u_conv (
    .clk, .rst_n, .init, .sym_bits(n_dbps(cfg)), .tail_at(tail_pos(cfg)), .stbc(cfg.stbc),
    .din(s_data), .in_valid(s_valid), .in_ready(s_ready),
    .dout(c_data), .nbits(c_n), .sos(c_sos), .eos(c_eos), .last(c_last),
    .out_valid(c_valid), .out_ready(c_ready), .stop
  );

  // encoder -> interleaver
  logic [15:0] e_bits; logic [4:0] e_cnt; logic e_eos, e_last, e_valid, e_ready;
  conv_enc u_enc (
    .clk, .rst_n, .init, .rate(code_rate(cfg.mcs)),
    .din(c_data), .nbits(c_n), .sos(c_sos), .eos_in(c_eos), .last_in(c_last),
    .in_valid(c_valid), .in_ready(c_ready),
    .cbits(e_bits), .ccnt(e_cnt), .eos(e_eos), .last(e_last),
    .out_valid(e_valid), .out_ready(e_ready)
  );

  // interleaver -> mapper
  logic [5:0] i_d0, i_d1; logic i_sos, i_eos, i_last, i_valid, i_ready;
  interleaver u_il (
    .clk, .rst_n, .init, .bpscs(n_bpscs(cfg.mcs)), .bw40(cfg.bw40), .nss2(two_ss(cfg.mcs)),
    .cbits(e_bits), .ccnt(e_cnt), .eos_in(e_eos), .last_in(e_last),
    .in_valid(e_valid), .in_ready(e_ready),
    .d0(i_d0), .d1(i_d1), .sos(i_sos), .eos(i_eos), .last(i_last),
    .out_valid(i_valid), .out_ready(i_ready)
  );

  // mapper -> MIMO encoder
  cplx_t m_x0, m_x1; logic m_sos, m_eos, m_last, m_valid, m_ready;
  mapper u_map (
    .clk, .rst_n, .init, .bpscs(n_bpscs(cfg.mcs)), .b0(i_d0), .b1(i_d1),
    .sos_in(i_sos), .eos_in(i_eos), .last_in(i_last), .in_valid(i_valid), .in_ready(i_ready),
    .x0(m_x0), .x1(m_x1), .sos(m_sos), .eos(m_eos), .last(m_last),
    .out_valid(m_valid), .out_ready(m_ready)
  );

  // MIMO encoder + pilot generator -> cyclic shift
  logic [2:0] pidx; logic next_sym, pneg0, pneg1;
  pilot_gen u_pil (
    .clk, .rst_n, .init, .bw40(cfg.bw40), .sts2(two_tx(cfg)), .next_sym, .pidx,
    .neg0(pneg0), .neg1(pneg1)
  );

  cplx_t y0, y1; logic signed [7:0] yk; logic y_eos, y_last, y_valid, y_ready;
  logic unused_sos, unused_msos, unused_meos;
  assign unused_msos = m_sos;
  assign unused_meos = m_eos;
  mimo_enc u_mimo (
    .clk, .rst_n, .init, .bw40(cfg.bw40), .nss2(two_ss(cfg.mcs)), .stbc(cfg.stbc),
    .x0(m_x0), .x1(m_x1), .last_in(m_last), .in_valid(m_valid), .in_ready(m_ready),
    .pidx, .next_sym, .pneg0, .pneg1,
    .y0, .y1, .kout(yk), .sos(unused_sos), .eos(y_eos), .last(y_last),
    .out_valid(y_valid), .out_ready(y_ready)
  );

  // cyclic shift -> IFFT controller
  cplx_t z0, z1; logic z_eos, z_last, z_valid, z_ready;
  cyclic_shift u_csd (
    .clk, .rst_n, .init, .enable(two_tx(cfg)),
    .y0, .y1, .k(yk), .eos_in(y_eos), .last_in(y_last), .in_valid(y_valid), .in_ready(y_ready),
    .z0, .z1, .eos(z_eos), .last(z_last), .out_valid(z_valid), .out_ready(z_ready)
  );

  logic unused_zeos;
  assign unused_zeos = z_eos;
  ifft_ctrl u_ifft (
    .clk, .rst_n, .init, .bw40(cfg.bw40), .two_chains(two_tx(cfg)),
    .z0, .z1, .last_in(z_last), .in_valid(z_valid), .in_ready(z_ready),
    .ifft1_re, .ifft1_im, .ifft1_en, .ifft2_re, .ifft2_im, .ifft2_en, .sym_start, .done
  );

endmodule
