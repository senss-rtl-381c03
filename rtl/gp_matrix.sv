// gp_matrix: the group-processor bit matrix of one SHU.
//
// Row g holds one bit per processor: bit p set means processor p belongs to
// group g. A processor only keeps the rows of groups it is itself a member
// of; the row of any other group reads as all zeroes. Looking up the GID and
// PID that tag a bus message therefore tells in O(1) whether this SHU must
// decrypt the message (hit) or discard it.
//
// The row storage is a plain memory array; a separate per-row valid bit,
// cleared by reset and by a release, makes unused rows read as zero without
// clearing the array. A written row is kept only if it contains this
// processor (my_pid); otherwise the row is recorded as empty.
//
// Interface: lk_* is a combinational lookup (row, membership bit of lk_pid,
// and whether this processor is a member at all); mb_gid/mb_member is a
// second combinational membership port (this processor only). Writes take
// effect on the next edge.
//
// The bit-per-(group, processor) organisation, 1024 groups, up to 32
// processors and the all-zero row for foreign groups follow the document
// (so a row is 32 bits wide; a 5-bit-per-group sizing would not hold a
// member set). The valid bits and the two lookup ports are this design's.
module gp_matrix
  import senss_pkg::*;
#(
  parameter int unsigned GROUPS = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PID_W-1:0]         my_pid,
  // row write / release
  input  logic                     wr_en,
  input  logic [GID_W-1:0]         wr_gid,
  input  logic [MAXPROC-1:0]       wr_row,
  input  logic                     clr_en,
  input  logic [GID_W-1:0]         clr_gid,
  // lookup by bus tag
  input  logic [GID_W-1:0]         lk_gid,
  input  logic [PID_W-1:0]         lk_pid,
  output logic                     lk_hit,
  output logic                     lk_member,
  output logic [MAXPROC-1:0]       lk_row,
  // membership of this processor in a second group
  input  logic [GID_W-1:0]         mb_gid,
  output logic                     mb_member
);

  localparam int unsigned IDX_W = $clog2(GROUPS);

  logic [MAXPROC-1:0] rows [GROUPS];
  logic [GROUPS-1:0]  row_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= '0;
    end else begin
      if (clr_en) row_valid[IDX_W'(clr_gid)] <= 1'b0;
      if (wr_en)  row_valid[IDX_W'(wr_gid)]  <= wr_row[my_pid];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_row[my_pid]) rows[IDX_W'(wr_gid)] <= wr_row;
  end

  always_comb begin
    lk_member = row_valid[IDX_W'(lk_gid)] && (32'(lk_gid) < GROUPS);
    lk_row    = lk_member ? rows[IDX_W'(lk_gid)] : '0;
    lk_hit    = lk_row[lk_pid];
    mb_member = row_valid[IDX_W'(mb_gid)] && (32'(mb_gid) < GROUPS);
  end

endmodule
