// tb_gp_matrix: self-checking test of the group-processor bit matrix.
//
// Processor 2 writes the rows of the two example groups of the SENSS overview
// (members {0,1,2} and {2,3,...}) and of a group it does not belong to, then
// checks every (GID, PID) lookup against a reference model kept in the
// testbench, that foreign and unwritten rows read as zero, and that a release
// empties a row. Also checks random writes against the model.
module tb_gp_matrix;
  import senss_pkg::*;

  localparam int unsigned GROUPS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PID_W-1:0]   my_pid = PID_W'(2);
  logic               wr_en, clr_en;
  logic [GID_W-1:0]   wr_gid, clr_gid, lk_gid, mb_gid;
  logic [MAXPROC-1:0] wr_row, lk_row;
  logic [PID_W-1:0]   lk_pid;
  logic               lk_hit, lk_member, mb_member;

  gp_matrix #(.GROUPS(GROUPS)) dut (.*);

  logic [MAXPROC-1:0] model [GROUPS];
  int checks = 0, failures = 0;

  task automatic write_row(input int g, input logic [MAXPROC-1:0] r);
    @(negedge clk);
    wr_en  = 1'b1;
    wr_gid = GID_W'(g);
    wr_row = r;
    @(negedge clk);
    wr_en  = 1'b0;
    model[g] = r[my_pid] ? r : '0;
  endtask

  task automatic release_row(input int g);
    @(negedge clk);
    clr_en  = 1'b1;
    clr_gid = GID_W'(g);
    @(negedge clk);
    clr_en  = 1'b0;
    model[g] = '0;
  endtask

  task automatic check(input int g, input int p);
    lk_gid = GID_W'(g);
    lk_pid = PID_W'(p);
    mb_gid = GID_W'(g);
    #1;
    checks++;
    if (lk_hit !== model[g][p] || lk_row !== model[g] ||
        lk_member !== (model[g] != 0) || mb_member !== (model[g] != 0)) begin
      failures++;
      $display("FAIL: g=%0d p=%0d hit=%b row=%h want %h", g, p, lk_hit, lk_row, model[g]);
    end
  endtask

  initial begin
    wr_en = 0; clr_en = 0; wr_gid = 0; clr_gid = 0; wr_row = 0;
    lk_gid = 0; lk_pid = 0; mb_gid = 0;
    for (int g = 0; g < int'(GROUPS); g++) model[g] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 32; p++) check(1, p);              // empty after reset
    write_row(1, 32'h0000_0007);                           // group {0,1,2}
    write_row(2, 32'hFFFF_FFFC);                           // group {2..31}
    write_row(3, 32'h0000_0003);                           // group {0,1}: not mine
    for (int g = 1; g <= 3; g++)
      for (int p = 0; p < 32; p++) check(g, p);
    checks++;
    if (model[3] != 0) begin failures++; $display("FAIL: model"); end
    release_row(1);
    for (int p = 0; p < 32; p++) check(1, p);
    for (int i = 0; i < 200; i++) begin
      int g;
      logic [MAXPROC-1:0] r;
      g = $urandom_range(GROUPS - 1);
      r = $urandom;
      if (i % 3 == 0) r[my_pid] = 1'b1;
      write_row(g, r);
      check(g, $urandom_range(31));
      check($urandom_range(GROUPS - 1), $urandom_range(31));
    end
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
