// shift_rows_tb: self-checking testbench for shift_rows. Random states and the FIPS-197 round-1 ShiftRows value are compared.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module shift_rows_tb;
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
  shift_rows dut (.state_in(din), .state_out(dout));

  initial begin
    din = 128'hd42711aee0bf98f1b8b45de51e415230; #1;
    check(dout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 B round 1");
    din = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check(dout, 128'h00050a0f04090e03080d02070c01060b, "byte index pattern");
    for (int i = 0; i < 2000; i++) begin
      din = rand128(); #1;
      check(dout, ref_shift_rows(din), "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
