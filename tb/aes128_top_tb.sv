// aes128_top_tb: end-to-end testbench of the whole design, at its default
// (and only) configuration. The same list of blocks, each with its own
// random key plus the two FIPS-197 examples, is encrypted by both cores of
// aes128_top at once:
//   * the pipelined core gets them as a stream with back-to-back bursts and
//     random gaps;
//   * the sequential core takes them one after another through its
//     start/busy/done handshake, with extra starts poked in while busy.
// Each result is checked three ways: sequential against the independent
// AES model in aes_ref_pkg, pipelined against sequential (the two
// implementations agree), and pipelined against the model. Latency is
// checked for both cores. The mechanisms of the design are counted and each
// must occur: the pipeline holding ten blocks, a block entering on every
// clock, an empty slot (bubble) in the pipeline, two neighbouring blocks in
// the pipeline with different keys, and a start ignored by the busy core.
module aes128_top_tb;
  import aes_ref_pkg::*;

  localparam int NBLK    = 120;
  localparam int LATENCY = 10;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic         p_in_valid, p_out_valid, s_start, s_busy, s_done;
  logic [127:0] p_pt, p_key, p_ct, s_pt, s_key, s_ct;

  aes128_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .pipe_in_valid(p_in_valid), .pipe_plaintext(p_pt), .pipe_key(p_key),
    .pipe_out_valid(p_out_valid), .pipe_ciphertext(p_ct),
    .seq_start(s_start), .seq_plaintext(s_pt), .seq_key(s_key),
    .seq_busy(s_busy), .seq_done(s_done), .seq_ciphertext(s_ct)
  );

  initial begin
    repeat (40000) @(posedge clk);
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

  logic [127:0] blk_pt [NBLK], blk_key [NBLK], pipe_res [NBLK], seq_res [NBLK];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_full = 0, n_back_to_back = 0, n_bubble = 0, n_key_change = 0, n_ignored = 0;

  // Pipelined core: issue-time bookkeeping and in-order result capture.
  int p_issue [NBLK];
  int p_in_idx = 0, p_out_idx = 0;
  logic prev_valid = 1'b0;
  logic [127:0] prev_key;
  always @(posedge clk) begin
    if (rst_n) begin
      if (p_in_valid) begin
        p_issue[p_in_idx] = cycle;
        p_in_idx++;
        if (prev_valid) n_back_to_back++;
        if (prev_valid && prev_key != p_key) n_key_change++;
        prev_key = p_key;
      end else if (p_in_idx > 0 && p_in_idx < NBLK) n_bubble++;
      prev_valid = p_in_valid;
      if (p_out_valid) begin
        check(p_out_idx < NBLK, "pipeline output with no block");
        if (p_out_idx < NBLK) begin
          pipe_res[p_out_idx] = p_ct;
          check(cycle - p_issue[p_out_idx] == LATENCY,
                $sformatf("pipeline latency %0d", cycle - p_issue[p_out_idx]));
          p_out_idx++;
        end
      end
      if (p_in_idx - p_out_idx >= LATENCY) n_full++;
    end
  end

  task automatic drive_pipe();
    int i = 0;
    while (i < NBLK) begin
      @(negedge clk);
      if (i >= 2 && i < 40) p_in_valid = 1'b1;            // long burst
      else p_in_valid = ($urandom_range(0, 3) != 0);
      if (p_in_valid) begin
        p_pt = blk_pt[i]; p_key = blk_key[i]; i++;
      end else begin
        p_pt = rand128(); p_key = rand128();
      end
    end
    @(negedge clk) p_in_valid = 1'b0;
  endtask

  task automatic drive_seq();
    for (int i = 0; i < NBLK; i++) begin
      int n;
      @(negedge clk);
      check(!s_busy, "sequential core idle before start");
      s_start = 1'b1; s_pt = blk_pt[i]; s_key = blk_key[i];
      @(negedge clk);
      s_start = 1'b0; n = 0;
      while (!s_done && n < 50) begin
        if (n == 3 && (i % 3 == 0)) begin
          s_start = 1'b1; s_pt = rand128(); s_key = rand128(); n_ignored++;
        end else s_start = 1'b0;
        @(negedge clk);
        n++;
      end
      s_start = 1'b0;
      check(s_done, "sequential done");
      check(n == LATENCY, $sformatf("sequential latency %0d", n));
      seq_res[i] = s_ct;
    end
  endtask

  initial begin
    rst_n = 1'b0; p_in_valid = 1'b0; s_start = 1'b0;
    p_pt = '0; p_key = '0; s_pt = '0; s_key = '0;
    blk_pt[0] = 128'h00112233445566778899aabbccddeeff; blk_key[0] = 128'h000102030405060708090a0b0c0d0e0f;
    blk_pt[1] = 128'h3243f6a8885a308d313198a2e0370734; blk_key[1] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int i = 2; i < NBLK; i++) begin
      blk_pt[i] = rand128();
      blk_key[i] = (i % 5 == 0) ? blk_key[i-1] : rand128();
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      drive_pipe();
      drive_seq();
    join
    repeat (LATENCY + 3) @(negedge clk);
    check(p_out_idx == NBLK, $sformatf("pipeline returned %0d of %0d blocks", p_out_idx, NBLK));
    check(seq_res[0] === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 ciphertext");
    check(seq_res[1] === 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");
    for (int i = 0; i < NBLK; i++) begin
      logic [127:0] e;
      e = ref_encrypt(blk_pt[i], blk_key[i]);
      check(seq_res[i] === e, $sformatf("block %0d: sequential %h, model %h", i, seq_res[i], e));
      check(pipe_res[i] === seq_res[i], $sformatf("block %0d: pipelined %h, sequential %h", i, pipe_res[i], seq_res[i]));
      check(pipe_res[i] === e, $sformatf("block %0d: pipelined %h, model %h", i, pipe_res[i], e));
    end
    $display("mechanisms: pipeline_full=%0d back_to_back=%0d bubbles=%0d key_changes=%0d ignored_starts=%0d",
             n_full, n_back_to_back, n_bubble, n_key_change, n_ignored);
    check(n_full > 0, "pipeline never held ten blocks");
    check(n_back_to_back > 0, "no back-to-back blocks");
    check(n_bubble > 0, "no bubble in the pipeline");
    check(n_key_change > 0, "no key change between neighbouring blocks");
    check(n_ignored > 0, "no start ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
