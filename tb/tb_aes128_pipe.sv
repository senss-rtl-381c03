// tb_aes128_pipe: self-checking test of the pipelined AES-128 engine.
//
// Feeds the published FIPS-197 / NIST known-answer vectors (three key and
// plaintext pairs) back to back, one per cycle, in a repeating pattern with
// gaps, and checks each ciphertext, its tag, the in-order delivery and that
// it appears exactly LAT cycles after it was presented (one block per cycle
// throughput, fixed latency).
module tb_aes128_pipe;
  import aes_pkg::*;

  localparam int unsigned LAT = 80;
  localparam int unsigned NV  = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid;
  blk_t        in_key, in_data, out_data;
  logic [15:0] in_tag, out_tag;
  logic        out_valid;

  aes128_pipe #(.LAT(LAT), .TAG_W(16)) dut (.*);

  blk_t kv [NV], pv [NV], cv [NV];
  initial begin
    kv[0] = 128'h000102030405060708090a0b0c0d0e0f;
    pv[0] = 128'h00112233445566778899aabbccddeeff;
    cv[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    kv[1] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pv[1] = 128'h3243f6a8885a308d313198a2e0370734;
    cv[1] = 128'h3925841d02dc09fbdc118597196a0b32;
    kv[2] = 128'h0;
    pv[2] = 128'h0;
    cv[2] = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected-output queue: {issue cycle, vector index, tag}
  int          q_cyc [$];
  int          q_vec [$];
  logic [15:0] q_tag [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q_cyc.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %h", out_data);
      end else begin
        int c, v;
        logic [15:0] t;
        c = q_cyc.pop_front();
        v = q_vec.pop_front();
        t = q_tag.pop_front();
        if (out_data !== cv[v] || out_tag !== t || cycle - c != int'(LAT)) begin
          failures++;
          $display("FAIL: vec %0d got %h tag %h lat %0d, want %h tag %h lat %0d",
                   v, out_data, out_tag, cycle - c, cv[v], t, LAT);
        end
      end
    end
  end

  int sent = 0;
  initial begin
    in_valid = 1'b0;
    in_key   = '0;
    in_data  = '0;
    in_tag   = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      if (i % 7 == 6) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        in_key   = kv[i % NV];
        in_data  = pv[i % NV];
        in_tag   = 16'(i * 37);
        q_cyc.push_back(cycle);
        q_vec.push_back(i % NV);
        q_tag.push_back(16'(i * 37));
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (q_cyc.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q_cyc.size());
    end
    $display("sent %0d blocks", sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
