// add_round_key_tb: self-checking testbench for add_round_key. Random states and keys and the FIPS-197 round-1 AddRoundKey value are compared.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module add_round_key_tb;
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

  logic [127:0] din, k, dout;
  add_round_key dut (.state_in(din), .round_key(k), .state_out(dout));

  initial begin
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    k   = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    check(dout, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 B round 1");
    for (int i = 0; i < 2000; i++) begin
      din = rand128(); k = rand128(); #1;
      check(dout, din ^ k, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
