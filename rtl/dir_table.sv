// dir_table: directory shared by all address lines of a memory unit.
//
// Instead of a full directory per memory line, the memory keeps one table of
// DIR_SIZE entries, each an (address, site id) pair with a valid bit and a
// "sent" bit. For a memory line in Tw, entries with sent=1 form the first
// directory (DownReq_wb already sent, no reply yet) and entries with sent=0
// the second directory (DownReq_wb still to send). For a line in Cw all
// entries have sent=0.
//
// Lookup is combinational: for the address lk_a the table returns the two
// directories as P-bit masks of site ids. One update per cycle: ALLOC puts
// (op_a, op_id, op_sent) in the lowest free entry (ignored when full), FREE
// invalidates the entry (op_a, op_id), MARK sets its sent bit. full is high
// when no entry is free. Updates take effect at the next clock edge.
//
// The shared table follows the protocol's shared Dir (an (address, id) list
// used by all lines). The sent bit encoding of the two Tw directories, the
// lowest-free-entry allocation and the table size are this design's choice.
module dir_table #(
  parameter int P        = 256,
  parameter int N        = 16,
  parameter int DIR_SIZE = 8,
  localparam int ID_W    = (P > 1) ? $clog2(P) : 1,
  localparam int A_W     = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic [A_W-1:0]  lk_a,
  output logic [P-1:0]    lk_dir1,
  output logic [P-1:0]    lk_dir2,
  output logic            full,
  // update
  input  logic            op_valid,
  input  logic [1:0]      op_kind,   // 0: ALLOC, 1: FREE, 2: MARK
  input  logic [A_W-1:0]  op_a,
  input  logic [ID_W-1:0] op_id,
  input  logic            op_sent
);
  localparam logic [1:0] OPK_ALLOC = 2'd0;
  localparam logic [1:0] OPK_FREE  = 2'd1;
  localparam logic [1:0] OPK_MARK  = 2'd2;

  typedef struct packed {
    logic            valid;
    logic            sent;
    logic [A_W-1:0]  a;
    logic [ID_W-1:0] id;
  } dent_t;

  dent_t ent [DIR_SIZE];

  // lookup
  always_comb begin
    lk_dir1 = '0;
    lk_dir2 = '0;
    full    = 1'b1;
    for (int i = 0; i < DIR_SIZE; i++) begin
      if (!ent[i].valid) full = 1'b0;
      if (ent[i].valid && ent[i].a == lk_a) begin
        if (ent[i].sent) lk_dir1[ent[i].id] = 1'b1;
        else             lk_dir2[ent[i].id] = 1'b1;
      end
    end
  end

  // lowest free entry and the entry matching (op_a, op_id)
  logic                  free_found, hit_found;
  localparam int IX_W = (DIR_SIZE > 1) ? $clog2(DIR_SIZE) : 1;
  logic [IX_W-1:0]       free_idx, hit_idx;
  always_comb begin
    free_found = 1'b0;
    hit_found  = 1'b0;
    free_idx   = '0;
    hit_idx    = '0;
    for (int i = DIR_SIZE - 1; i >= 0; i--) begin
      if (!ent[i].valid) begin
        free_found = 1'b1;
        free_idx   = IX_W'(i);
      end
      if (ent[i].valid && ent[i].a == op_a && ent[i].id == op_id) begin
        hit_found = 1'b1;
        hit_idx   = IX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIR_SIZE; i++) ent[i] <= '0;
    end else if (op_valid) begin
      case (op_kind)
        OPK_ALLOC: if (free_found && !hit_found)
                     ent[free_idx] <= '{valid: 1'b1, sent: op_sent, a: op_a, id: op_id};
        OPK_FREE:  if (hit_found) ent[hit_idx].valid <= 1'b0;
        OPK_MARK:  if (hit_found) ent[hit_idx].sent  <= 1'b1;
        default: ;
      endcase
    end
  end
endmodule
