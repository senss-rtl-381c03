// tb_group_info_table: self-checking test of the group information table.
//
// Checks, against a reference model in the testbench: occupied bits and the
// lowest-free-GID allocator through occupy/release, key and interval
// storage, per-slot mask and MAC writes from the configuration port, block
// write-backs from the AES port (alone and in the same cycle as a
// configuration write), the mask/MAC read ports and the two digest ports
// (XOR of all MAC chains of a group).
module tb_group_info_table;
  import senss_pkg::*;

  localparam int unsigned GROUPS = 1024;
  localparam int unsigned NMASK  = 8;
  localparam int unsigned DATA_W = 256;
  localparam int unsigned NB     = DATA_W / 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cfg_en;
  cfg_op_e           cfg_op;
  logic [GID_W-1:0]  cfg_gid, a_gid, b_gid, m_gid, d_gid, e_gid, wb_gid, free_gid;
  logic [2:0]        cfg_slot, a_slot, b_slot, m_slot, wb_slot;
  logic [DATA_W-1:0] cfg_data, a_mask, b_mask, d_digest, e_digest;
  logic              a_occ, b_occ, wb_en, wb_is_mac, free_valid;
  logic [CTR_W-1:0]  a_ctr, b_ctr;
  logic [KEY_W-1:0]  b_key;
  logic [0:0]        m_blk, wb_blk;
  logic [127:0]      m_mac, wb_data;

  group_info_table #(.GROUPS(GROUPS), .NMASK(NMASK), .DATA_W(DATA_W)) dut (.*);

  int checks = 0, failures = 0;

  // reference model for a few groups
  logic [DATA_W-1:0] mmask [4][NMASK];
  logic [DATA_W-1:0] mmac  [4][NMASK];
  logic [KEY_W-1:0]  mkey  [4];
  logic [CTR_W-1:0]  mctr  [4];
  int gids [4] = '{5, 9, 700, 1023};

  task automatic cfg(input cfg_op_e op, input int g, input int s, input logic [DATA_W-1:0] d);
    @(negedge clk);
    cfg_en = 1'b1; cfg_op = op; cfg_gid = GID_W'(g); cfg_slot = 3'(s); cfg_data = d;
    @(negedge clk);
    cfg_en = 1'b0;
  endtask

  task automatic expect_eq(input string what, input logic [DATA_W-1:0] got,
                           input logic [DATA_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL: %s got %h want %h", what, got, want);
    end
  endtask

  function automatic logic [DATA_W-1:0] rnd();
    logic [DATA_W-1:0] r;
    for (int i = 0; i < DATA_W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check_group(input int i);
    logic [DATA_W-1:0] dg;
    dg = '0;
    for (int s = 0; s < int'(NMASK); s++) dg ^= mmac[i][s];
    for (int s = 0; s < int'(NMASK); s++) begin
      a_gid = GID_W'(gids[i]); a_slot = 3'(s);
      b_gid = GID_W'(gids[i]); b_slot = 3'(s);
      d_gid = GID_W'(gids[i]); e_gid  = GID_W'(gids[i]);
      m_gid = GID_W'(gids[i]); m_slot = 3'(s); m_blk = 1'b1;
      #1;
      expect_eq("a_mask", a_mask, mmask[i][s]);
      expect_eq("b_mask", b_mask, mmask[i][s]);
      expect_eq("m_mac", {128'b0, m_mac}, {128'b0, mmac[i][s][255:128]});
    end
    expect_eq("key", {128'b0, b_key}, {128'b0, mkey[i]});
    expect_eq("ctr", DATA_W'(a_ctr), DATA_W'(mctr[i]));
    expect_eq("ctr_b", DATA_W'(b_ctr), DATA_W'(mctr[i]));
    expect_eq("digest_d", d_digest, dg);
    expect_eq("digest_e", e_digest, dg);
    expect_eq("occ", DATA_W'(a_occ), 1);
    expect_eq("occ_b", DATA_W'(b_occ), 1);
  endtask

  initial begin
    cfg_en = 0; cfg_op = CFG_OCCUPY; cfg_gid = 0; cfg_slot = 0; cfg_data = 0;
    a_gid = 0; b_gid = 0; m_gid = 0; d_gid = 0; e_gid = 0; a_slot = 0; b_slot = 0; m_slot = 0;
    m_blk = 0; wb_en = 0; wb_gid = 0; wb_slot = 0; wb_is_mac = 0; wb_blk = 0; wb_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    expect_eq("free after reset", DATA_W'({free_valid, free_gid}), DATA_W'({1'b1, 10'd0}));
    // allocation: occupy 0..3, free must be 4; release 2, free must be 2
    for (int g = 0; g < 4; g++) cfg(CFG_OCCUPY, g, 0, '0);
    #1 expect_eq("free 4", DATA_W'(free_gid), 4);
    cfg(CFG_RELEASE, 2, 0, '0);
    #1 expect_eq("free 2", DATA_W'(free_gid), 2);
    a_gid = 10'd2; #1 expect_eq("released", DATA_W'(a_occ), 0);
    a_gid = 10'd3; #1 expect_eq("occupied", DATA_W'(a_occ), 1);
    // fill four groups
    for (int i = 0; i < 4; i++) begin
      cfg(CFG_OCCUPY, gids[i], 0, '0);
      mkey[i] = rnd();
      mctr[i] = 8'($urandom);
      cfg(CFG_KEY, gids[i], 0, DATA_W'(mkey[i]));
      cfg(CFG_CTR, gids[i], 0, DATA_W'(mctr[i]));
      for (int s = 0; s < int'(NMASK); s++) begin
        mmask[i][s] = rnd();
        mmac[i][s]  = rnd();
        cfg(CFG_MASK, gids[i], s, mmask[i][s]);
        cfg(CFG_MAC,  gids[i], s, mmac[i][s]);
      end
    end
    for (int i = 0; i < 4; i++) check_group(i);
    // AES write-backs, some in the same cycle as a configuration write
    for (int n = 0; n < 64; n++) begin
      int i, s, b;
      logic m;
      logic [127:0] d;
      i = $urandom_range(3); s = $urandom_range(7); b = $urandom_range(1); m = 1'($urandom);
      d = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      wb_en = 1'b1; wb_gid = GID_W'(gids[i]); wb_slot = 3'(s); wb_is_mac = m;
      wb_blk = 1'(b); wb_data = d;
      if (n % 4 == 0) begin
        cfg_en = 1'b1; cfg_op = CFG_CTR; cfg_gid = GID_W'(gids[(i + 1) % 4]);
        cfg_data = DATA_W'(n);
        mctr[(i + 1) % 4] = 8'(n);
      end
      @(negedge clk);
      wb_en = 1'b0; cfg_en = 1'b0;
      if (m) mmac[i][s][b*128 +: 128] = d;
      else   mmask[i][s][b*128 +: 128] = d;
    end
    for (int i = 0; i < 4; i++) check_group(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
