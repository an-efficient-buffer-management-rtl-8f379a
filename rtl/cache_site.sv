// cache_site: one cache site, that is, the cache engine with its buffers.
//
// The processor pushes instructions into PMB (processor-to-memory buffer)
// and pops results from MPB (memory-to-processor buffer). The cache engine
// sends requests (CacheReq, Wb) into LOUT, the low-priority outgoing queue,
// and responses (Down*, DownV*, ErFRTag) into HOUT, the high-priority
// outgoing queue. Messages from memory arrive in IN. All queues are
// synchronous FIFOs; a push is accepted when the queue is not full.
//
// Interface: proc_req_* (valid/ready) into PMB; proc_rsp_* (valid, pop) out
// of MPB; hout_*/lout_* queue heads with pop; in_push/in_msg with in_full;
// request counter and request tags for the fairness logic; voluntary rule
// port; debug port; events from the engine. One clock, asynchronous
// active-low reset.
//
// The queue set and the minimum sizes (HOUT 2, LOUT rqmax, IN 1) follow the
// protocol's buffer requirements. PMB and MPB sizes are this design's own
// choice. An instruction retires only when MPB has room, so a processor that
// stops popping MPB stalls its own PMB (but never the protocol messages in
// IN, which do not need MPB).
module cache_site
  import bcachet_pkg::*;
#(
  parameter int P         = 256,
  parameter int N         = 16,
  parameter int V_W       = 32,
  parameter int RQMAX     = 2,
  parameter int TAG_W     = 4,
  parameter int PMB_SIZE  = 2,
  parameter int MPB_SIZE  = 2,
  parameter int HOUT_SIZE = 2,
  parameter int LOUT_SIZE = RQMAX,
  parameter int IN_SIZE   = 1,
  localparam int ID_W     = (P > 1) ? $clog2(P) : 1,
  localparam int A_W      = (N > 1) ? $clog2(N) : 1,
  localparam int MSG_W    = 5 + ID_W + A_W + 1 + V_W,
  localparam int RQ_W     = $clog2(RQMAX + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ID_W-1:0]           site_id,
  // processor side
  input  logic                      proc_req_valid,
  input  logic [2:0]                proc_req_op,
  input  logic [TAG_W-1:0]          proc_req_tag,
  input  logic [A_W-1:0]            proc_req_a,
  input  logic [V_W-1:0]            proc_req_v,
  output logic                      proc_req_ready,
  output logic                      proc_rsp_valid,
  output logic [TAG_W-1:0]          proc_rsp_tag,
  output logic [V_W-1:0]            proc_rsp_v,
  input  logic                      proc_rsp_pop,
  // network side
  output logic                      hout_valid,
  output logic [MSG_W-1:0]          hout_msg,
  input  logic                      hout_pop,
  output logic                      lout_valid,
  output logic [MSG_W-1:0]          lout_msg,
  input  logic                      lout_pop,
  output logic                      in_full,
  input  logic                      in_push,
  input  logic [MSG_W-1:0]          in_msg,
  output logic [RQ_W-1:0]           rqcnt,
  output logic [RQMAX-1:0]          tags_valid,
  output logic [RQMAX-1:0][A_W-1:0] tags_a,
  // voluntary rule request
  input  logic                      vc_valid,
  input  logic [2:0]                vc_op,
  input  logic [A_W-1:0]            vc_a,
  output logic                      vc_done,
  output logic                      vc_fired,
  // observation
  input  logic [A_W-1:0]            dbg_a,
  output logic [3:0]                dbg_cs,
  output logic [V_W-1:0]            dbg_v,
  output logic [3:0]                ev
);
  localparam int PMB_W = 3 + TAG_W + A_W + V_W;
  localparam int MPB_W = TAG_W + V_W;

  // PMB
  logic pmb_empty, pmb_full, pmb_pop;
  logic [PMB_W-1:0] pmb_head;
  logic [2:0]       pmb_op;
  logic [TAG_W-1:0] pmb_tag;
  logic [A_W-1:0]   pmb_a;
  logic [V_W-1:0]   pmb_v;
  sync_fifo #(.W(PMB_W), .DEPTH(PMB_SIZE)) u_pmb (
    .clk, .rst_n,
    .push(proc_req_valid && !pmb_full),
    .wr_data({proc_req_op, proc_req_tag, proc_req_a, proc_req_v}),
    .pop(pmb_pop), .rd_data(pmb_head), .empty(pmb_empty), .full(pmb_full),
    .count(), .free()
  );
  assign proc_req_ready = !pmb_full;
  assign {pmb_op, pmb_tag, pmb_a, pmb_v} = pmb_head;

  // MPB
  logic mpb_full, mpb_empty, mpb_push;
  logic [TAG_W-1:0] mpb_tag;
  logic [V_W-1:0]   mpb_v;
  sync_fifo #(.W(MPB_W), .DEPTH(MPB_SIZE)) u_mpb (
    .clk, .rst_n,
    .push(mpb_push), .wr_data({mpb_tag, mpb_v}),
    .pop(proc_rsp_pop && !mpb_empty), .rd_data({proc_rsp_tag, proc_rsp_v}),
    .empty(mpb_empty), .full(mpb_full), .count(), .free()
  );
  assign proc_rsp_valid = !mpb_empty;

  // HOUT, LOUT, IN
  logic hout_empty, hout_full, hout_push;
  logic lout_empty, lout_full, lout_push;
  logic in_empty, in_pop;
  logic [MSG_W-1:0] hout_wr, lout_wr, in_head;

  sync_fifo #(.W(MSG_W), .DEPTH(HOUT_SIZE)) u_hout (
    .clk, .rst_n, .push(hout_push), .wr_data(hout_wr),
    .pop(hout_pop), .rd_data(hout_msg), .empty(hout_empty), .full(hout_full),
    .count(), .free()
  );
  sync_fifo #(.W(MSG_W), .DEPTH(LOUT_SIZE)) u_lout (
    .clk, .rst_n, .push(lout_push), .wr_data(lout_wr),
    .pop(lout_pop), .rd_data(lout_msg), .empty(lout_empty), .full(lout_full),
    .count(), .free()
  );
  sync_fifo #(.W(MSG_W), .DEPTH(IN_SIZE)) u_in (
    .clk, .rst_n, .push(in_push), .wr_data(in_msg),
    .pop(in_pop), .rd_data(in_head), .empty(in_empty), .full(in_full),
    .count(), .free()
  );
  assign hout_valid = !hout_empty;
  assign lout_valid = !lout_empty;

  cache_engine #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX), .TAG_W(TAG_W)) u_eng (
    .clk, .rst_n, .site_id,
    .pmb_valid(!pmb_empty), .pmb_op, .pmb_tag, .pmb_a, .pmb_v, .pmb_pop,
    .mpb_full, .mpb_push, .mpb_tag, .mpb_v,
    .in_valid(!in_empty), .in_msg(in_head), .in_pop,
    .hout_empty, .hout_push, .hout_msg(hout_wr),
    .lout_full, .lout_push, .lout_msg(lout_wr),
    .rqcnt, .tags_valid, .tags_a,
    .vc_valid, .vc_op, .vc_a, .vc_done, .vc_fired,
    .dbg_a, .dbg_cs, .dbg_v, .ev
  );
endmodule
