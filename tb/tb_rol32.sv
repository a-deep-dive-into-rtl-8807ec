// tb_rol32: checks the rol_32 unit against a bit-by-bit rotation of the
// 64-bit lane, for every amount 0..63 and both halves, and that the result
// is registered (appears one cycle after en_i and holds while en_i is low).
module tb_rol32;
  import kronos_tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, sel = 0;
  logic [31:0] lo, hi, res;
  logic [5:0] amt;
  lane_t r;

  rol32 dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .lo_i(lo), .hi_i(hi),
             .amt_i(amt), .sel_hi_i(sel), .res_o(res));

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

  initial begin
    lo = 0; hi = 0; amt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(res == 0, "reset value");
    for (int t = 0; t < 256; t++) begin
      lo = $urandom; hi = $urandom; amt = 6'(t % 64); sel = t[6];
      en = 1;
      r = rol({hi, lo}, t % 64);
      @(negedge clk);
      en = 0;
      check(res == (sel ? r[63:32] : r[31:0]), $sformatf("amount %0d half %0d", t % 64, sel));
      lo = ~lo; @(negedge clk);
      check(res == (sel ? r[63:32] : r[31:0]), "result holds without en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
