// memory_site: the memory unit with its queues.
//
// HIN receives high-priority messages (cache responses), LIN low-priority
// messages (requests). OUT carries every memory-to-cache message. STQ holds
// requests the memory stalled; the head of STQ is moved back into LIN when
// LIN has room (message passing rule STQ). When both STQ and the network
// want to write LIN in the same cycle they take turns.
//
// Interface: hin_push/hin_msg with hin_full; lin_req/lin_req_msg offered by
// the network, lin_ready tells when it is taken (transfer = lin_req &&
// lin_ready); out_valid/out_msg with out_pop; FRTAG candidate port; voluntary
// rule port; debug port; events. STQ_SIZE may be 0, in which case every
// stalled request is refused with a Nack at once.
//
// Queue set and minimum sizes (HIN 1, LIN 1, OUT 2, STQ 0) follow the
// protocol's buffer requirements; the STQ/network alternation is this
// design's own choice.
module memory_site
  import bcachet_pkg::*;
#(
  parameter int P        = 256,
  parameter int N        = 16,
  parameter int V_W      = 32,
  parameter int DIR_SIZE = 8,
  parameter int GM_SIZE  = 1,
  parameter int HIN_SIZE = 1,
  parameter int LIN_SIZE = 1,
  parameter int OUT_SIZE = 2,
  parameter int STQ_SIZE = 2,
  localparam int ID_W    = (P > 1) ? $clog2(P) : 1,
  localparam int A_W     = (N > 1) ? $clog2(N) : 1,
  localparam int MSG_W   = 5 + ID_W + A_W + 1 + V_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hin_push,
  input  logic [MSG_W-1:0]   hin_msg,
  output logic               hin_full,
  input  logic               lin_req,
  input  logic [MSG_W-1:0]   lin_req_msg,
  output logic               lin_ready,
  output logic               out_valid,
  output logic [MSG_W-1:0]   out_msg,
  input  logic               out_pop,
  input  logic               cand_valid,
  input  logic [ID_W-1:0]    cand_id,
  input  logic [A_W-1:0]     cand_a,
  output logic               cand_take,
  input  logic               vm_valid,
  input  logic [2:0]         vm_op,
  input  logic [A_W-1:0]     vm_a,
  input  logic [ID_W-1:0]    vm_id,
  output logic               vm_done,
  output logic               vm_fired,
  input  logic [A_W-1:0]     dbg_a,
  output logic [2:0]         dbg_kind,
  output logic [V_W-1:0]     dbg_v,
  output logic               dbg_own_v,
  output logic [ID_W-1:0]    dbg_own,
  output logic               frtag_valid,
  output logic               fr_busy,
  output logic               stq_nonempty,
  output logic [NUM_MEV-1:0] ev
);
  localparam int OF_W = $clog2(OUT_SIZE + 1);

  logic hin_empty, hin_pop;
  logic [MSG_W-1:0] hin_head;
  sync_fifo #(.W(MSG_W), .DEPTH(HIN_SIZE)) u_hin (
    .clk, .rst_n, .push(hin_push), .wr_data(hin_msg),
    .pop(hin_pop), .rd_data(hin_head), .empty(hin_empty), .full(hin_full),
    .count(), .free()
  );

  logic lin_empty, lin_full, lin_pop, lin_push;
  logic [MSG_W-1:0] lin_head, lin_wr;
  sync_fifo #(.W(MSG_W), .DEPTH(LIN_SIZE)) u_lin (
    .clk, .rst_n, .push(lin_push), .wr_data(lin_wr),
    .pop(lin_pop), .rd_data(lin_head), .empty(lin_empty), .full(lin_full),
    .count(), .free()
  );

  logic out_empty, out_push;
  logic [MSG_W-1:0] out_wr;
  logic [OF_W-1:0]  out_free;
  sync_fifo #(.W(MSG_W), .DEPTH(OUT_SIZE)) u_out (
    .clk, .rst_n, .push(out_push), .wr_data(out_wr),
    .pop(out_pop), .rd_data(out_msg), .empty(out_empty), .full(),
    .count(), .free(out_free)
  );
  assign out_valid = !out_empty;

  logic stq_full, stq_push, stq_go;
  logic [MSG_W-1:0] stq_wr;

  generate
    if (STQ_SIZE > 0) begin : g_stq
      logic stq_empty, stq_pri_q;
      logic [MSG_W-1:0] stq_head;
      sync_fifo #(.W(MSG_W), .DEPTH(STQ_SIZE)) u_stq (
        .clk, .rst_n, .push(stq_push), .wr_data(stq_wr),
        .pop(stq_go), .rd_data(stq_head), .empty(stq_empty), .full(stq_full),
        .count(), .free()
      );
      assign stq_go = !stq_empty && !lin_full && (stq_pri_q || !lin_req);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) stq_pri_q <= 1'b0;
        else if (!lin_full && lin_req && !stq_empty) stq_pri_q <= ~stq_pri_q;
      end
      assign lin_wr       = stq_go ? stq_head : lin_req_msg;
      assign stq_nonempty = !stq_empty;
    end else begin : g_no_stq
      assign stq_full     = 1'b1;
      assign stq_go       = 1'b0;
      assign lin_wr       = lin_req_msg;
      assign stq_nonempty = 1'b0;
    end
  endgenerate

  assign lin_ready = !lin_full && !stq_go;
  assign lin_push  = stq_go || (lin_req && lin_ready);

  memory_engine #(.P(P), .N(N), .V_W(V_W), .DIR_SIZE(DIR_SIZE), .GM_SIZE(GM_SIZE),
                  .OUT_SIZE(OUT_SIZE)) u_eng (
    .clk, .rst_n,
    .hin_valid(!hin_empty), .hin_msg(hin_head), .hin_pop,
    .lin_valid(!lin_empty), .lin_msg(lin_head), .lin_pop,
    .stq_full, .stq_push, .stq_msg(stq_wr),
    .out_free, .out_push, .out_msg(out_wr),
    .cand_valid, .cand_id, .cand_a, .cand_take,
    .vm_valid, .vm_op, .vm_a, .vm_id, .vm_done, .vm_fired,
    .dbg_a, .dbg_kind, .dbg_v, .dbg_own_v, .dbg_own, .frtag_valid, .fr_busy, .ev
  );
endmodule
