// tb_conv_enc: checks the 8-bit parallel encoder and puncturer against a serial reference
// with continuous puncturing, for all four code rates, symbols of N_DBPS bits cut into
// chunks of up to 8 bits, random gaps and back-pressure; also that a full 8-bit chunk at
// rate 1/2 gives 16 coded bits in one clock.
module tb_conv_enc;
  import tx_pkg::*;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, out_ready = 1;
  rate_e rate = R12;
  logic [7:0] din = 0; logic [3:0] nbits = 0; logic sos = 0, eos_in = 0, last_in = 0;
  logic in_ready; logic [15:0] cbits; logic [4:0] ccnt; logic eos, last, out_valid;
  conv_enc dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(int mcs, int nsym);
    bitq_t d, c;
    int nd = r_ndbps(mcs, 0), got, nsy;
    bit fin;
    for (int i = 0; i < nd * nsym; i++) d.push_back(1'($urandom));
    c = r_encode(d, mcs);
    rate <= code_rate(4'(mcs));
    init <= 1; @(posedge clk); init <= 0;
    got = 0; nsy = 0; fin = 0;
    fork
      begin
        int p, sb;
        p = 0; sb = 0;
        while (p < nd * nsym) begin
          int n;
          n = (nd - sb >= 8) ? 8 : nd - sb;
          in_valid <= 1;
          for (int i = 0; i < 8; i++) din[i] <= (i < n) ? d[p + i] : 1'b0;
          nbits <= 4'(n); sos <= (sb == 0); eos_in <= (sb + n == nd);
          last_in <= (p + n == nd * nsym);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          p += n; sb = (sb + n == nd) ? 0 : sb + n;
          if ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
        end
        in_valid <= 0;
      end
      begin
        while (!fin) begin
          out_ready <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            for (int i = 0; i < int'(ccnt); i++)
              check(cbits[i] == c[got + i], $sformatf("mcs%0d coded bit %0d", mcs, got + i));
            got += ccnt;
            if (eos) begin
              nsy++;
              check(got == nsy * r_ncbps(mcs, 0), "coded bits per symbol");
            end
            if (last) fin = 1;
          end
        end
      end
    join
    check(got == c.size(), "coded bit count");
    out_ready <= 1;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    run(0, 3); run(5, 3); run(2, 4); run(7, 3); run(15, 2);
    // throughput: 8 bits in, 16 bits out, one clock
    rate <= R12; init <= 1; @(posedge clk); init <= 0;
    din <= 8'hff; nbits <= 8; sos <= 1; in_valid <= 1; @(posedge clk); in_valid <= 0;
    #1 check(out_valid && ccnt == 16, "16 coded bits per clock at rate 1/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
