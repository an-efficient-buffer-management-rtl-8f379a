// gm_buffer: suspended message buffer (GM) shared by all address lines.
//
// When a writeback reaches a memory line that is busy downgrading other
// caches, the memory stores the written value at once and keeps only the
// name of the writer here until it may acknowledge it. The buffer is a table
// of GM_SIZE (address, site id) entries. Lookup is combinational: for
// address lk_a it reports whether any entry exists (lk_any) and the site id
// of the lowest such entry (lk_id). full is high when no entry is free.
// One update per cycle: ADD stores (op_a, op_id) in the lowest free entry,
// REMOVE invalidates the entry (op_a, op_id); both at the next clock edge.
//
// The shared buffer of site names and its minimum size of one entry follow
// the protocol description; allocation order and the default size of one
// entry (the minimum that keeps the protocol live) are this design's choice.
module gm_buffer #(
  parameter int P       = 256,
  parameter int N       = 16,
  parameter int GM_SIZE = 1,
  localparam int ID_W   = (P > 1) ? $clog2(P) : 1,
  localparam int A_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [A_W-1:0]  lk_a,
  output logic            lk_any,
  output logic [ID_W-1:0] lk_id,
  output logic            full,
  input  logic            op_valid,
  input  logic            op_add,     // 1: ADD, 0: REMOVE
  input  logic [A_W-1:0]  op_a,
  input  logic [ID_W-1:0] op_id
);
  typedef struct packed {
    logic            valid;
    logic [A_W-1:0]  a;
    logic [ID_W-1:0] id;
  } gent_t;

  gent_t ent [GM_SIZE];

  logic free_found, hit_found;
  localparam int IX_W = (GM_SIZE > 1) ? $clog2(GM_SIZE) : 1;
  logic [IX_W-1:0] free_idx, hit_idx;

  always_comb begin
    lk_any     = 1'b0;
    lk_id      = '0;
    full       = 1'b1;
    free_found = 1'b0;
    hit_found  = 1'b0;
    free_idx   = '0;
    hit_idx    = '0;
    for (int i = GM_SIZE - 1; i >= 0; i--) begin
      if (!ent[i].valid) begin
        full       = 1'b0;
        free_found = 1'b1;
        free_idx   = IX_W'(i);
      end
      if (ent[i].valid && ent[i].a == lk_a) begin
        lk_any = 1'b1;
        lk_id  = ent[i].id;
      end
      if (ent[i].valid && ent[i].a == op_a && ent[i].id == op_id) begin
        hit_found = 1'b1;
        hit_idx   = IX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < GM_SIZE; i++) ent[i] <= '0;
    end else if (op_valid) begin
      if (op_add) begin
        if (free_found && !hit_found)
          ent[free_idx] <= '{valid: 1'b1, a: op_a, id: op_id};
      end else if (hit_found) begin
        ent[hit_idx].valid <= 1'b0;
      end
    end
  end
endmodule
