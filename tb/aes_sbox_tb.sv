// aes_sbox_tb: self-checking testbench for aes_sbox. Every one of the 256 inputs is applied and compared, plus three published S-box entries.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module aes_sbox_tb;
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

  logic [7:0] din, dout;
  aes_sbox dut (.in_byte(din), .out_byte(dout));

  initial begin
    for (int x = 0; x < 256; x++) begin
      din = 8'(x); #1;
      check(128'(dout), 128'(ref_sbox(8'(x))), $sformatf("sbox[%02h]", x));
    end
    din = 8'h00; #1; check(128'(dout), 128'h63, "sbox[00]=63");
    din = 8'h53; #1; check(128'(dout), 128'hed, "sbox[53]=ed");
    din = 8'hff; #1; check(128'(dout), 128'h16, "sbox[ff]=16");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
