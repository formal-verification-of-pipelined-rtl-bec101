// aes128_seq_tb: self-checking testbench for the iterative AES-128 core.
// It encrypts the two FIPS-197 example vectors and random blocks with
// random keys, and compares each ciphertext with the independent model in
// aes_ref_pkg. It also checks the handshake: done comes exactly 10 clocks
// after start was taken, busy is high in between, a start raised while busy
// (with other data) is ignored, and the ciphertext is held after done.
module aes128_seq_tb;
  import aes_ref_pkg::*;

  localparam int LATENCY = 10;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, start, busy, done;
  logic [127:0] pt, key, ct;

  aes128_seq dut (
    .clk_i(clk), .rst_ni(rst_n), .start(start), .plaintext(pt), .key(key),
    .busy(busy), .done(done), .ciphertext(ct)
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

  int ignored_starts = 0;

  task automatic encrypt(input logic [127:0] p, input logic [127:0] k, input bit poke);
    logic [127:0] e;
    int n;
    e = ref_encrypt(p, k);
    @(negedge clk);
    check(!busy, "idle before start");
    start = 1'b1; pt = p; key = k;
    @(negedge clk);
    start = 1'b0; pt = rand128(); key = rand128();
    n = 0;   // clocks since the edge that took start
    while (!done && n < 50) begin
      check(busy, "busy while computing");
      if (poke && n == 4) begin
        start = 1'b1; ignored_starts++;       // must be ignored
      end else start = 1'b0;
      @(negedge clk);
      n++;
    end
    start = 1'b0;
    check(done, "done raised");
    check(n == LATENCY, $sformatf("latency %0d", n));
    check(ct === e, $sformatf("ciphertext %h expected %h", ct, e));
    @(negedge clk);
    check(!done, "done is a single pulse");
    check(ct === e, "ciphertext held after done");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; pt = '0; key = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 1'b0);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b1);
    for (int i = 0; i < 200; i++) encrypt(rand128(), rand128(), 1'($urandom));
    check(ignored_starts > 0, "a start during busy was tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
