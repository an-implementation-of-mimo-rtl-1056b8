// tb_mimo_tx_top: end-to-end test of the transmitter against the reference model.
//
// Sends packets over all 16 MCS, both bandwidths, SISO, SDM and STBC, with the PSDU
// delivered with random gaps, and compares every IFFT input bin of both chains with
// tx_ref_pkg::r_packet (chain 1 exactly, chain 2 within 1 LSB for the rounding of the
// cyclic shift). Long MCS 15 packets at 40 MHz and 20 MHz with a gap-free PSDU check the
// symbol rate: at the 40 MHz clock one OFDM symbol must leave at least every 160 clocks
// (4 us; 270 Mbit/s at 40 MHz), and at 20 MHz at least every 80 clocks, which a 20 MHz clock
// also sustains. It counts how often each mechanism happened (pilot insertion, STBC
// pairing, interleaver back-pressure, IFFT-controller waits for the next symbol, partial encoder chunks,
// odd-step cyclic shifts, symbol padding) and fails if one never did.
// The top runs with its default (and only) configuration.
module tb_mimo_tx_top;
  import tx_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] cfg_mcs = 0; logic cfg_bw40 = 0, cfg_stbc = 0;
  logic [15:0] cfg_length = 0; logic [6:0] cfg_seed = 0;
  logic [7:0] psdu_data = 0; logic psdu_valid = 0, psdu_ready;
  logic signed [12:0] ifft1_re, ifft1_im, ifft2_re, ifft2_im;
  logic ifft1_en, ifft2_en, sym_start, busy, done;

  mimo_tx_top dut (.*);

  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;
  int n_pilot = 0, n_stbc = 0, n_ilfull = 0, n_ifwait = 0, n_partial = 0, n_csd = 0;
  int n_pad = 0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_mimo.fire && dut.u_mimo.pil) n_pilot++;
    if (dut.u_mimo.fire && dut.u_mimo.ph == dut.u_mimo.PH_ODD) n_stbc++;
    if (dut.e_valid && !dut.e_ready) n_ilfull++;
    if (busy && !dut.u_ifft.adv && dut.u_ifft.bin == 0) n_ifwait++;
    if (dut.c_valid && dut.c_ready && dut.c_n != 4'd8) n_partial++;
    if (dut.y_valid && dut.y_ready && dut.u_csd.enable && dut.yk[0]) n_csd++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  byte unsigned psdu[$];
  bit gapfree;

  task automatic feed();
    int i = 0;
    while (i < psdu.size()) begin
      psdu_valid <= gapfree || ($urandom_range(0, 3) != 0);
      psdu_data  <= psdu[i];
      @(posedge clk);
      if (psdu_valid && psdu_ready) i++;
    end
    psdu_valid <= 0;
  endtask

  task automatic run_packet(int mcs, int bw40, int stbc, int len, int max_period);
    intq_t exp_v;
    int nfft = bw40 ? 128 : 64;
    int sym = -1, bin = 0, nsym, ntx, got = 0, worst = 0;
    longint last_start = 0;
    bit [6:0] seed = 7'($urandom_range(1, 127));
    psdu.delete();
    for (int i = 0; i < len; i++) psdu.push_back(8'($urandom));
    exp_v = r_packet(psdu, mcs, bw40, stbc, seed);
    nsym = r_nsym(mcs, bw40, (mcs < 8) ? stbc : 0, len);
    ntx = (mcs >= 8 || stbc) ? 2 : 1;
    if (nsym * r_ndbps(mcs, bw40) - (22 + 8 * len) >= r_ndbps(mcs, bw40)) n_pad++;
    @(posedge clk);
    cfg_mcs <= 4'(mcs); cfg_bw40 <= bw40[0]; cfg_stbc <= stbc[0];
    cfg_length <= 16'(len); cfg_seed <= seed; start <= 1;
    @(posedge clk);
    start <= 0;
    fork
      feed();
      begin
        while (!done) begin
          @(posedge clk);
          if (ifft1_en) begin
            if (sym_start) begin
              sym++; bin = 0;
              if (sym >= 2 && int'(cyc - last_start) > worst) worst = int'(cyc - last_start);
              last_start = cyc;
            end
            if (sym >= 0 && sym < nsym) begin
              int base = ((sym * 2) * nfft + bin) * 2;
              int b2 = ((sym * 2 + 1) * nfft + bin) * 2;
              check(ifft1_re == exp_v[base] && ifft1_im == exp_v[base+1],
                    $sformatf("mcs%0d bw40=%0d sym%0d bin%0d ch1 %0d,%0d exp %0d,%0d", mcs, bw40,
                              sym, bin, ifft1_re, ifft1_im, exp_v[base], exp_v[base+1]));
              if (ntx == 2) begin
                int dr = int'(ifft2_re) - exp_v[b2], di = int'(ifft2_im) - exp_v[b2+1];
                check(ifft2_en && dr >= -1 && dr <= 1 && di >= -1 && di <= 1,
                      $sformatf("mcs%0d sym%0d bin%0d ch2 %0d,%0d exp %0d,%0d", mcs, sym, bin,
                                ifft2_re, ifft2_im, exp_v[b2], exp_v[b2+1]));
              end else check(!ifft2_en, "chain 2 idle in SISO");
              got++;
            end
            bin++;
          end
        end
      end
    join
    check(got == nsym * nfft, $sformatf("mcs%0d bw40=%0d len%0d: %0d bins, expected %0d",
                                        mcs, bw40, len, got, nsym * nfft));
    if (max_period > 0) begin
      check(worst > 0 && worst <= max_period,
            $sformatf("symbol period %0d clocks, limit %0d", worst, max_period));
      $display("mcs%0d bw40=%0d: steady-state symbol period %0d clocks", mcs, bw40, worst);
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    gapfree = 0;
    run_packet(0, 0, 0, 10, 0);
    run_packet(7, 0, 1, 30, 0);
    run_packet(15, 1, 0, 200, 0);
    run_packet(11, 1, 0, 50, 0);
    run_packet(2, 0, 0, 17, 0);
    run_packet(13, 0, 0, 40, 0);
    run_packet(4, 1, 1, 25, 0);
    run_packet(9, 1, 0, 33, 0);
    run_packet(5, 1, 0, 60, 0);
    run_packet(14, 0, 0, 77, 0);
    run_packet(1, 0, 1, 5, 0);
    run_packet(3, 1, 0, 12, 0);
    run_packet(6, 0, 0, 23, 0);
    run_packet(8, 0, 0, 3, 0);
    run_packet(10, 1, 0, 9, 0);
    run_packet(12, 0, 0, 21, 0);
    run_packet(0, 1, 1, 1, 0);
    run_packet(15, 0, 0, 0, 0);
    gapfree = 1;
    run_packet(15, 1, 0, 1500, 160);
    run_packet(15, 0, 0, 700, 80);
    check(n_pilot > 0,   "pilot insertion happened");
    check(n_stbc > 0,    "STBC pairing happened");
    check(n_ilfull > 0,  "interleaver back-pressure happened");
    check(n_ifwait > 0,  "IFFT controller wait happened");
    check(n_partial > 0, "partial encoder chunk happened");
    check(n_csd > 0,     "odd-step cyclic shift happened");
    check(n_pad > 0,     "whole pad symbol happened");
    $display("mechanisms: pilot=%0d stbc=%0d il_full=%0d ifft_wait=%0d partial=%0d csd_odd=%0d pad=%0d",
             n_pilot, n_stbc, n_ilfull, n_ifwait, n_partial, n_csd, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
