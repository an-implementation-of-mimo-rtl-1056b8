// tb_converter: checks symbol framing, chunk sizes, tail zeroing, padding (and the even
// symbol count under STBC), the last flag and stop, against the bit stream it was fed,
// with random input gaps and output back-pressure.
module tb_converter;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, stbc = 0, in_valid = 0, out_ready = 1;
  logic [10:0] sym_bits = 0; logic [19:0] tail_at = 0;
  logic [15:0] din = 0; logic in_ready;
  logic [7:0] dout; logic [3:0] nbits; logic sos, eos, last, out_valid, stop;
  converter dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(int mcs, int bw40, int st, int len);
    bit src[$];
    int nd = r_ndbps(mcs, bw40), nsym = r_nsym(mcs, bw40, st, len), total, got, symb, nsy;
    bit done_rx;
    total = nsym * nd;
    for (int i = 0; i < total + 16; i++) src.push_back(1'($urandom));
    sym_bits <= 11'(nd); tail_at <= 20'(16 + 8 * len); stbc <= st[0];
    init <= 1; @(posedge clk); init <= 0; @(posedge clk);
    got = 0; symb = 0; nsy = 0; done_rx = 0;
    fork
      begin
        int w;
        w = 0;
        while (!stop) begin
          in_valid <= ($urandom_range(0, 3) != 0);
          for (int i = 0; i < 16; i++) din[i] <= src[(16 * w + i) % src.size()];
          @(posedge clk);
          if (in_valid && in_ready) w++;
        end
        in_valid <= 0;
      end
      begin
        while (!done_rx) begin
          out_ready <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            int want;
            want = (nd - symb >= 8) ? 8 : nd - symb;
            check(int'(nbits) == want, $sformatf("chunk size %0d exp %0d", nbits, want));
            check(sos == (symb == 0), "sos");
            for (int i = 0; i < int'(nbits); i++) begin
              int p = got + i;
              bit e = (p >= 16 + 8 * len && p < 22 + 8 * len) ? 1'b0 : src[p];
              check(dout[i] == e, $sformatf("bit %0d", p));
            end
            got += nbits; symb += nbits;
            check(eos == (symb == nd), "eos");
            if (symb == nd) begin symb = 0; nsy++; end
            check(last == (got == total), $sformatf("last at bit %0d of %0d", got, total));
            if (last) done_rx = 1;
          end
        end
      end
    join
    check(nsy == nsym, $sformatf("symbols %0d exp %0d", nsy, nsym));
    out_ready <= 1;
    repeat (3) @(posedge clk);
    check(!out_valid, "nothing after last");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    run(0, 0, 0, 3);
    run(7, 1, 0, 40);
    run(2, 0, 1, 11);
    run(13, 0, 0, 25);
    run(4, 1, 1, 2);
    run(15, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
