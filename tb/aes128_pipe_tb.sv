// aes128_pipe_tb: self-checking testbench for the ten-stage AES-128
// pipeline. It streams blocks with random plaintexts and a new random key
// per block, with bursts of back-to-back blocks (the pipeline full, ten
// blocks in flight) and random gaps, plus the two FIPS-197 example vectors.
// A scoreboard holds the expected ciphertext (from the independent model in
// aes_ref_pkg) and the issue cycle of each block; every output must match
// in order and arrive exactly 10 clocks after its block entered. Inputs are
// driven on the falling edge, outputs sampled on the rising edge.
module aes128_pipe_tb;
  import aes_ref_pkg::*;

  localparam int LATENCY = 10;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, in_valid, out_valid;
  logic [127:0] pt, key, ct;

  aes128_pipe dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid(in_valid), .plaintext(pt), .key(key),
    .out_valid(out_valid), .ciphertext(ct)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [127:0] exp_q [$];
  int           t_q   [$];
  int           in_flight = 0, max_in_flight = 0, outputs = 0;

  // Scoreboard: outputs in order, at the fixed latency.
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      exp_q.push_back(ref_encrypt(pt, key));
      t_q.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) check(1'b0, "output with no block in flight");
      else begin
        logic [127:0] e;
        int t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        check(ct === e, $sformatf("ciphertext %h expected %h", ct, e));
        check(cycle - t == LATENCY, $sformatf("latency %0d", cycle - t));
        outputs++;
      end
    end
    in_flight = exp_q.size();
    if (in_flight > max_in_flight) max_in_flight = in_flight;
  end

  task automatic send(input logic [127:0] p, input logic [127:0] k);
    @(negedge clk);
    in_valid = 1'b1; pt = p; key = k;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0; pt = rand128(); key = rand128();
    end
  endtask

  int sent = 0;
  initial begin
    rst_n = 1'b0; in_valid = 1'b0; pt = '0; key = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Known answers, back to back.
    send(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    send(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    sent += 2;
    idle(3);
    // A long back-to-back burst: the pipeline fills completely.
    for (int i = 0; i < 40; i++) begin send(rand128(), rand128()); sent++; end
    // Random gaps.
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 2) == 0) idle($urandom_range(1, 4));
      send(rand128(), rand128()); sent++;
    end
    idle(LATENCY + 5);
    check(outputs == sent, $sformatf("%0d blocks out of %0d", outputs, sent));
    check(max_in_flight >= LATENCY, $sformatf("pipeline held at most %0d blocks", max_in_flight));
    $display("blocks=%0d max_in_flight=%0d", sent, max_in_flight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
