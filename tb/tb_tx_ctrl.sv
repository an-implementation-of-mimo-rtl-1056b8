// tb_tx_ctrl: checks the word stream of the Tx controller (SERVICE word, PSDU bytes two per
// word, zero pad words until stop) for even and odd lengths under random handshakes, the
// captured configuration, the init pulse and busy/done.
module tb_tx_ctrl;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done = 0, stop = 0;
  tx_cfg_t cfg_in = '0, cfg;
  logic init, busy;
  logic [7:0] psdu_data = 0; logic psdu_valid = 0, psdu_ready;
  logic [15:0] word; logic word_valid, word_ready = 1;
  tx_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 6; t++) begin
      int len, got, extra;
      byte unsigned b[$];
      logic [15:0] exp_w[$];
      len = (t == 0) ? 0 : $urandom_range(1, 9);
      got = 0; extra = 3; b.delete(); exp_w.delete();
      for (int i = 0; i < len; i++) b.push_back(8'($urandom));
      exp_w.push_back(16'h0);
      for (int i = 0; i < len; i += 2) exp_w.push_back({(i + 1 < len) ? b[i+1] : 8'h00, b[i]});
      for (int i = 0; i < extra; i++) exp_w.push_back(16'h0);
      cfg_in <= '{mcs: 4'($urandom), bw40: 1'b1, stbc: 1'b0, length: 16'(len), seed: 7'h5d};
      start <= 1; @(posedge clk); start <= 0;
      #1 check(init && busy && cfg.length == 16'(len) && cfg.seed == 7'h5d, "init, busy, cfg");
      fork
        begin
          int i;
          i = 0;
          while (i < len) begin
            psdu_valid <= ($urandom_range(0, 2) != 0); psdu_data <= b[i];
            @(posedge clk);
            if (psdu_valid && psdu_ready) i++;
          end
          psdu_valid <= 0;
        end
        begin
          while (got < exp_w.size()) begin
            word_ready <= ($urandom_range(0, 2) != 0);
            @(posedge clk);
            if (word_valid && word_ready) begin
              check(word == exp_w[got], $sformatf("len %0d word %0d got %h exp %h", len, got, word, exp_w[got]));
              got++;
            end
          end
        end
      join
      word_ready <= 1; stop <= 1; @(posedge clk); stop <= 0; @(posedge clk); @(posedge clk);
      check(!word_valid, "no words after stop");
      done <= 1; @(posedge clk); done <= 0; #1 check(!busy, "busy cleared by done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
