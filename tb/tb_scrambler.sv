// tb_scrambler: checks the 16-bit parallel scrambler against the serial reference sequence
// for random seeds, with random input gaps and output back-pressure, the pass-through
// mode, and the one-clock latency.
module tb_scrambler;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, mode = 1, sel = 0, ena = 0, out_ready = 1;
  logic [6:0] seed = 0;
  logic [15:0] din = 0, dout;
  logic in_ready, valid;
  scrambler dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 6; t++) begin
      bitq_t sq;
      logic [15:0] words[$];
      int nout;
      nout = 0; words.delete();
      seed = 7'($urandom_range(1, 127));
      mode <= (t != 5);
      sq = r_scr_seq(seed, 16 * 40);
      sel <= 0; @(posedge clk); sel <= 1;
      fork
        begin
          int n;
          n = 0;
          while (n < 40) begin
            ena <= ($urandom_range(0, 3) != 0); din <= 16'($urandom);
            @(posedge clk);
            if (ena && in_ready) begin words.push_back(din); n++; end
          end
          ena <= 0;
        end
        begin
          while (nout < 40) begin
            out_ready <= ($urandom_range(0, 2) != 0);
            @(posedge clk);
            if (valid && out_ready) begin
              logic [15:0] e;
              for (int i = 0; i < 16; i++) e[i] = words[nout][i] ^ (mode & sq[16 * nout + i]);
              check(dout == e, $sformatf("seed %h word %0d got %h exp %h", seed, nout, dout, e));
              nout++;
            end
          end
        end
      join
      out_ready <= 1;
      @(posedge clk);
    end
    // latency: one clock from accepted input to valid output
    sel <= 0; @(posedge clk); sel <= 1; ena <= 1; din <= 16'h1234; @(posedge clk); ena <= 0;
    #1 check(valid, "one-clock latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
