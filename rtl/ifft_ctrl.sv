// ifft_ctrl: interface to the external IFFTs of the two transmit chains.
//
// A bin counter runs 0..N-1 (N = 64 at 20 MHz, 128 at 40 MHz) for every OFDM symbol and
// drives both IFFT inputs in natural bin order, bin b holding subcarrier k = b (b < N/2) or
// k = b - N. Bins of occupied subcarriers take the next input sample (which arrives in
// that order); DC and guard bins are sent as zero. A symbol starts only when its first
// sample is available, and the counter waits at an occupied bin whose sample is missing,
// with the enables low. ifft*_en marks each bin written; ifft2 is enabled only when the
// second chain is active. sym_start marks bin 0. done pulses after the last bin of the
// symbol that carried the packet's last sample. Outputs are registered.
// The counter and the split into real and imaginary paths follow the design's IFFT
// controller; the input handshake and the stall rule are this design's choice.
module ifft_ctrl
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        bw40,
  input  logic        two_chains,
  input  cplx_t       z0,
  input  cplx_t       z1,
  input  logic        last_in,
  input  logic        in_valid,
  output logic        in_ready,
  output logic signed [SW-1:0] ifft1_re,
  output logic signed [SW-1:0] ifft1_im,
  output logic        ifft1_en,
  output logic signed [SW-1:0] ifft2_re,
  output logic signed [SW-1:0] ifft2_im,
  output logic        ifft2_en,
  output logic        sym_start,
  output logic        done
);

  logic [6:0] bin;
  logic       seen_last;
  logic       occ, adv;
  logic [6:0] nmax;
  logic signed [7:0] kk;

  always_comb begin
    nmax = bw40 ? 7'd127 : 7'd63;
    if (!bw40) kk = (bin < 7'd32) ? 8'(bin) : 8'(bin) - 8'sd64;
    else       kk = (bin < 7'd64) ? 8'(bin) : $signed({1'b1, bin});   // bin - 128
    if (!bw40) occ = (kk != 0) && (kk <= 28) && (kk >= -28);
    else       occ = (kk > 1 || kk < -1) && (kk <= 58) && (kk >= -58);
    adv = occ ? in_valid : ((bin != 0) || in_valid);
  end

  assign in_ready = occ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin <= '0; seen_last <= 1'b0; done <= 1'b0; sym_start <= 1'b0;
      ifft1_re <= '0; ifft1_im <= '0; ifft1_en <= 1'b0;
      ifft2_re <= '0; ifft2_im <= '0; ifft2_en <= 1'b0;
    end else if (init) begin
      bin <= '0; seen_last <= 1'b0; done <= 1'b0; sym_start <= 1'b0;
      ifft1_en <= 1'b0; ifft2_en <= 1'b0;
    end else begin
      done <= 1'b0;
      ifft1_en <= adv; ifft2_en <= adv && two_chains;
      sym_start <= adv && (bin == 0);
      if (adv) begin
        ifft1_re <= occ ? z0.re : '0; ifft1_im <= occ ? z0.im : '0;
        ifft2_re <= (occ && two_chains) ? z1.re : '0;
        ifft2_im <= (occ && two_chains) ? z1.im : '0;
        if (occ && last_in) seen_last <= 1'b1;
        if (bin == nmax) begin
          bin <= '0;
          if (seen_last || (occ && last_in)) begin done <= 1'b1; seen_last <= 1'b0; end
        end else begin
          bin <= bin + 7'd1;
        end
      end
    end
  end

endmodule
