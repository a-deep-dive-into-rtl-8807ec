// tb_keccak_f: checks the iterative permutation engine.
// - known answer: Keccak-f[1600] of the zero state has lane 0 = F1258F7940E1DDE7
// - random states against the reference permutation
// - timing: done_o exactly 25 cycles after start_i, busy_o in between
// - a start_i while busy is ignored
// - chained permutations: the engine's output fed back as the next input
module tb_keccak_f;
  import kronos_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  kronos_pkg::state_t st_i, st_o;
  logic busy, done;
  state_t exp_s;
  int cyc;

  keccak_f dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .state_i(st_i),
                .busy_o(busy), .done_o(done), .state_o(st_o));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // start a permutation on s, return the cycle count to done
  task automatic run(input state_t s, input bit poke_busy, output int n);
    @(negedge clk); st_i = s; start = 1;
    @(negedge clk); start = 0; n = 1;
    while (!done) begin
      check(busy, "busy while running");
      if (poke_busy && n == 5) begin start = 1; st_i = '1; end
      else start = 0;
      @(negedge clk); n++;
    end
    start = 0;
  endtask

  initial begin
    st_i = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(!busy && !done, "idle after reset");
    run('0, 0, cyc);
    check(st_o[0] == 64'hF1258F7940E1DDE7, "zero-state known answer lane 0");
    check(st_o == ref_perm('0), "zero-state full");
    check(cyc == 25, $sformatf("latency %0d, expected 25", cyc));
    @(negedge clk);
    check(!done && !busy, "done is one cycle");
    for (int t = 0; t < 6; t++) begin
      automatic state_t s = rand_state();
      run(s, t == 2, cyc);
      exp_s = ref_perm(s);
      check(st_o == exp_s, $sformatf("random state %0d", t));
      check(cyc == 25, $sformatf("latency %0d", cyc));
    end
    // chain: permute the previous output again
    exp_s = ref_perm(st_o);
    run(st_o, 0, cyc);
    check(st_o == exp_s, "chained permutation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
