// senss_pkg: types and constants shared by the SENSS bus-security blocks.
//
// The shared bus of a SENSS multiprocessor carries, next to the data lines,
// a 2-bit message type, the 5-bit originator processor id (PID) and a 10-bit
// group id (GID). The widths of PID and GID and the three message types
// 00/01/10 follow the document; the code 11 for an ordinary cache-to-cache
// data transfer, and the configuration operations are
// this design's own choices.
package senss_pkg;

  localparam int unsigned PID_W   = 5;    // up to 32 processors
  localparam int unsigned MAXPROC = 1 << PID_W;
  localparam int unsigned GID_W   = 10;   // up to 1024 groups
  localparam int unsigned KEY_W   = 128;  // AES-128 session key
  localparam int unsigned BLK_W   = 128;  // AES block
  localparam int unsigned CTR_W   = 8;    // authentication interval field

  // Bus message type (2 extra command lines).
  typedef enum logic [1:0] {
    MSG_AUTH    = 2'b00,  // bus authentication (carries the MAC digest)
    MSG_PAD_INV = 2'b01,  // pad invalidate (memory encryption coherence)
    MSG_PAD_REQ = 2'b10,  // pad request (memory encryption coherence)
    MSG_DATA    = 2'b11   // encrypted cache-to-cache data transfer
  } msg_type_e;

  // Configuration operations written by the processor's trusted SHU
  // firmware path (group set-up and tear-down).
  typedef enum logic [2:0] {
    CFG_OCCUPY  = 3'd0,  // mark a GID allocated (done on every processor)
    CFG_RELEASE = 3'd1,  // free a GID at program end
    CFG_ROW     = 3'd2,  // write the member row of a group (data[MAXPROC-1:0])
    CFG_KEY     = 3'd3,  // plaintext session key k (data[KEY_W-1:0])
    CFG_CTR     = 3'd4,  // authentication interval (data[CTR_W-1:0]), 0 = off
    CFG_MASK    = 3'd5,  // initial encryption mask of one slot
    CFG_MAC     = 3'd6   // initial authentication vector of one slot
  } cfg_op_e;

  // The next member after `last` in a group row, cyclically: used to pick
  // the round-robin initiator of a bus authentication.
  function automatic logic [PID_W-1:0] next_member(input logic [MAXPROC-1:0] row,
                                                   input logic [PID_W-1:0]   last);
    logic [PID_W-1:0] r;
    logic             found;
    r     = last;
    found = 1'b0;
    for (int unsigned i = 1; i <= MAXPROC; i++) begin
      logic [PID_W-1:0] p;
      p = PID_W'(int'(last) + int'(i));
      if (!found && row[p]) begin
        r     = p;
        found = 1'b1;
      end
    end
    return r;
  endfunction

endpackage
