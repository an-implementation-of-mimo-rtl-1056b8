// tb_mapper: checks the constellation mapper for all four modulations on both streams
// against levels computed as n/sqrt(E) in real arithmetic, with back-pressure.
module tb_mapper;
  import tx_pkg::*;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, out_ready = 1;
  logic [2:0] bpscs = 1; logic [5:0] b0 = 0, b1 = 0;
  logic sos_in = 0, eos_in = 0, last_in = 0, in_ready;
  cplx_t x0, x1; logic sos, eos, last, out_valid;
  mapper dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic bitq_t tobits(logic [5:0] v);
    bitq_t q;
    for (int i = 0; i < 6; i++) q.push_back(v[i]);
    return q;
  endfunction

  initial begin
    int bl[4] = '{1, 2, 4, 6};
    repeat (2) @(posedge clk); rst_n <= 1;
    foreach (bl[m]) begin
      logic [5:0] q0[$], q1[$];
      int got;
      bpscs <= 3'(bl[m]);
      q0.delete(); q1.delete(); got = 0;
      for (int n = 0; n < 140; n++) begin
        logic [5:0] v0, v1;
        v0 = (n < 64) ? 6'(n) : 6'($urandom); v1 = 6'($urandom);
        in_valid <= 1; b0 <= v0; b1 <= v1; last_in <= (n == 139);
        out_ready <= ($urandom_range(0, 3) != 0);
        @(posedge clk);
        while (!in_ready) begin
          if (out_valid && out_ready) got++;
          out_ready <= 1;
          @(posedge clk);
        end
        q0.push_back(v0); q1.push_back(v1);
      end
      in_valid <= 0; out_ready <= 1;
      @(posedge clk);
      // compare the last accepted word with its expected point
      begin
        int er, ei;
        r_map(tobits(q0[$]), 0, bl[m], er, ei);
        check(x0.re == er && x0.im == ei, $sformatf("b=%0d s0 %0d,%0d exp %0d,%0d", bl[m], x0.re, x0.im, er, ei));
        r_map(tobits(q1[$]), 0, bl[m], er, ei);
        check(x1.re == er && x1.im == ei, "s1 last point");
        check(last, "last flag carried");
      end
      // exhaustive, one point per clock, no back-pressure
      for (int v = 0; v < (1 << bl[m]); v++) begin
        int er, ei, fr, fi;
        in_valid <= 1; b0 <= 6'(v); b1 <= 6'(~v); @(posedge clk); in_valid <= 0; #1;
        r_map(tobits(6'(v)), 0, bl[m], er, ei);
        r_map(tobits(6'(~v)), 0, bl[m], fr, fi);
        check(out_valid && x0.re == er && x0.im == ei && x1.re == fr && x1.im == fi,
              $sformatf("b=%0d v=%0d got %0d,%0d exp %0d,%0d", bl[m], v, x0.re, x0.im, er, ei));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
