// sub_bytes_tb: self-checking testbench for sub_bytes. Random states and the FIPS-197 round-1 SubBytes value are compared.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module sub_bytes_tb;
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

  logic [127:0] din, dout;
  sub_bytes dut (.state_in(din), .state_out(dout));

  initial begin
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    check(dout, 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 B round 1");
    for (int i = 0; i < 2000; i++) begin
      din = rand128(); #1;
      check(dout, ref_sub_bytes(din), "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
