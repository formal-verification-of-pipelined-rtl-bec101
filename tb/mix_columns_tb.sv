// mix_columns_tb: self-checking testbench for mix_columns. Random states, the FIPS-197 round-1 MixColumns value and a known single column are compared.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module mix_columns_tb;
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
  mix_columns dut (.state_in(din), .state_out(dout));

  initial begin
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check(dout, 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS-197 B round 1");
    din = {4{32'hdb135345}}; #1;
    check(dout, {4{32'h8e4da1bc}}, "column db135345");
    for (int i = 0; i < 2000; i++) begin
      din = rand128(); #1;
      check(dout, ref_mix_columns(din), "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
