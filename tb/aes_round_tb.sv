// aes_round_tb: self-checking testbench for aes_round. Runs all ten rounds of the FIPS-197 example through the unit and compares random states in both regular and final mode.
// Expected values come from aes_ref_pkg, an AES model written independently
// of the RTL. A watchdog ends the run with a failure if it hangs.
module aes_round_tb;
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
  logic         last;
  aes_round dut (.state_in(din), .round_key(k), .last_round(last), .state_out(dout));

  initial begin
    rk_t rk;
    logic [127:0] s;
    rk = ref_key_schedule(128'h2b7e151628aed2a6abf7158809cf4f3c);
    s = 128'h3243f6a8885a308d313198a2e0370734 ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      din = s; k = rk[r]; last = (r == 10); #1;
      s = dout;
      if (r == 1) check(dout, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 B after round 1");
    end
    check(s, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");
    for (int i = 0; i < 2000; i++) begin
      din = rand128(); k = rand128(); last = 1'($urandom); #1;
      check(dout, last ? (ref_shift_rows(ref_sub_bytes(din)) ^ k)
                       : (ref_mix_columns(ref_shift_rows(ref_sub_bytes(din))) ^ k),
            last ? "random final round" : "random regular round");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
