// key_expand_step_tb: self-checking testbench for key_expand_step. Chains ten steps from a cipher key and compares every round key with the full key schedule, for the FIPS-197 key and random keys.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module key_expand_step_tb;
  import aes_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [127:0] kin, kout;
  logic [3:0]   rnd;
  key_expand_step dut (.key_in(kin), .round_idx(rnd), .key_out(kout));

  task automatic chain(input logic [127:0] key);
    rk_t rk;
    rk = ref_key_schedule(key);
    kin = key;
    for (int r = 1; r <= 10; r++) begin
      rnd = 4'(r); #1;
      check(kout, rk[r], $sformatf("round key %0d", r));
      kin = kout;
    end
  endtask

  initial begin
    chain(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(kin, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 round key 10");
    for (int i = 0; i < 200; i++) chain(rand128());

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
