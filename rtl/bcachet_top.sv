// bcachet_top: a complete BCachet system of P cache sites, one memory site
// and the network between them.
//
// Each cache site has its own processor port: instructions (Loadl, Storel,
// Commit, Reconcile, Fence with a tag, address and value) go in through
// proc_req_* with a valid/ready handshake and results come back, tagged,
// on proc_rsp_* (pop to consume). The adaptive (voluntary) rules are not
// driven by any built-in policy: a policy outside requests them on vc_* per
// site and on vm_* for memory, each request held until the matching *_done
// and reported by *_fired (1 if the rule applied in the current state).
// The debug port reads the cache state and value of one site and the memory
// state of one address. ev_mem and ev_cache pulse when a protocol mechanism
// fires (indices in bcachet_pkg and cache_engine).
//
// Structure and queue minimums follow the protocol description; parameter
// defaults are the protocol's buffer minimums and a 256-site system. Other
// sizes (address count, value width, rqmax, STQ, directory, PMB/MPB) are this
// design's choice.
module bcachet_top
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
  parameter int HIN_SIZE  = 1,
  parameter int LIN_SIZE  = 1,
  parameter int OUT_SIZE  = 2,
  parameter int STQ_SIZE  = 2,
  parameter int DIR_SIZE  = 8,
  parameter int GM_SIZE   = 1,
  localparam int ID_W     = (P > 1) ? $clog2(P) : 1,
  localparam int A_W      = (N > 1) ? $clog2(N) : 1,
  localparam int MSG_W    = 5 + ID_W + A_W + 1 + V_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // processors
  input  logic [P-1:0]                 proc_req_valid,
  input  logic [P-1:0][2:0]            proc_req_op,
  input  logic [P-1:0][TAG_W-1:0]      proc_req_tag,
  input  logic [P-1:0][A_W-1:0]        proc_req_a,
  input  logic [P-1:0][V_W-1:0]        proc_req_v,
  output logic [P-1:0]                 proc_req_ready,
  output logic [P-1:0]                 proc_rsp_valid,
  output logic [P-1:0][TAG_W-1:0]      proc_rsp_tag,
  output logic [P-1:0][V_W-1:0]        proc_rsp_v,
  input  logic [P-1:0]                 proc_rsp_pop,
  // voluntary cache rules
  input  logic [P-1:0]                 vc_valid,
  input  logic [P-1:0][2:0]            vc_op,
  input  logic [P-1:0][A_W-1:0]        vc_a,
  output logic [P-1:0]                 vc_done,
  output logic [P-1:0]                 vc_fired,
  // voluntary memory rules
  input  logic                         vm_valid,
  input  logic [2:0]                   vm_op,
  input  logic [A_W-1:0]               vm_a,
  input  logic [ID_W-1:0]              vm_id,
  output logic                         vm_done,
  output logic                         vm_fired,
  // observation
  input  logic [ID_W-1:0]              dbg_site,
  input  logic [A_W-1:0]               dbg_a,
  output logic [3:0]                   dbg_cs,
  output logic [V_W-1:0]               dbg_cv,
  output logic [2:0]                   dbg_mkind,
  output logic [V_W-1:0]               dbg_mv,
  output logic                         dbg_mown_v,
  output logic [ID_W-1:0]              dbg_mown,
  output logic                         frtag_valid,
  output logic                         fr_busy,
  output logic                         stq_nonempty,
  output logic                         frcrt_valid,
  output logic [ID_W-1:0]              frcrt_id,
  output logic [P-1:0][$clog2(RQMAX+1)-1:0] rqcnt,
  output logic [NUM_MEV-1:0]           ev_mem,
  output logic [P-1:0][3:0]            ev_cache
);
  logic [P-1:0]                     hout_valid, hout_pop, lout_valid, lout_pop;
  logic [P-1:0]                     in_full, in_push;
  logic [P-1:0][MSG_W-1:0]          hout_msg, lout_msg;
  logic [MSG_W-1:0]                 in_msg;
  logic [P-1:0][RQMAX-1:0]          tags_valid;
  logic [P-1:0][RQMAX-1:0][A_W-1:0] tags_a;
  logic [P-1:0][3:0]                cs_all;
  logic [P-1:0][V_W-1:0]            cv_all;

  for (genvar s = 0; s < P; s++) begin : g_site
    cache_site #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX), .TAG_W(TAG_W),
                 .PMB_SIZE(PMB_SIZE), .MPB_SIZE(MPB_SIZE), .HOUT_SIZE(HOUT_SIZE),
                 .LOUT_SIZE(LOUT_SIZE), .IN_SIZE(IN_SIZE)) u_site (
      .clk, .rst_n, .site_id(ID_W'(s)),
      .proc_req_valid(proc_req_valid[s]), .proc_req_op(proc_req_op[s]),
      .proc_req_tag(proc_req_tag[s]), .proc_req_a(proc_req_a[s]),
      .proc_req_v(proc_req_v[s]), .proc_req_ready(proc_req_ready[s]),
      .proc_rsp_valid(proc_rsp_valid[s]), .proc_rsp_tag(proc_rsp_tag[s]),
      .proc_rsp_v(proc_rsp_v[s]), .proc_rsp_pop(proc_rsp_pop[s]),
      .hout_valid(hout_valid[s]), .hout_msg(hout_msg[s]), .hout_pop(hout_pop[s]),
      .lout_valid(lout_valid[s]), .lout_msg(lout_msg[s]), .lout_pop(lout_pop[s]),
      .in_full(in_full[s]), .in_push(in_push[s]), .in_msg,
      .rqcnt(rqcnt[s]), .tags_valid(tags_valid[s]), .tags_a(tags_a[s]),
      .vc_valid(vc_valid[s]), .vc_op(vc_op[s]), .vc_a(vc_a[s]),
      .vc_done(vc_done[s]), .vc_fired(vc_fired[s]),
      .dbg_a, .dbg_cs(cs_all[s]), .dbg_v(cv_all[s]), .ev(ev_cache[s])
    );
  end

  assign dbg_cs = cs_all[dbg_site];
  assign dbg_cv = cv_all[dbg_site];

  logic             hin_push, hin_full, lin_req, lin_ready, out_valid, out_pop;
  logic [MSG_W-1:0] hin_msg, lin_msg, out_msg;
  logic             cand_valid, cand_take;
  logic [ID_W-1:0]  cand_id;
  logic [A_W-1:0]   cand_a;

  network #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX)) u_net (
    .clk, .rst_n,
    .hout_valid, .hout_msg, .hout_pop, .lout_valid, .lout_msg, .lout_pop,
    .in_full, .in_push, .in_msg, .tags_valid, .tags_a,
    .hin_push, .hin_msg, .hin_full, .lin_req, .lin_msg, .lin_ready,
    .out_valid, .out_msg, .out_pop,
    .cand_valid, .cand_id, .cand_a, .cand_take,
    .frcrt_valid, .frcrt_id
  );

  memory_site #(.P(P), .N(N), .V_W(V_W), .DIR_SIZE(DIR_SIZE), .GM_SIZE(GM_SIZE),
                .HIN_SIZE(HIN_SIZE), .LIN_SIZE(LIN_SIZE), .OUT_SIZE(OUT_SIZE),
                .STQ_SIZE(STQ_SIZE)) u_mem (
    .clk, .rst_n,
    .hin_push, .hin_msg, .hin_full,
    .lin_req, .lin_req_msg(lin_msg), .lin_ready,
    .out_valid, .out_msg, .out_pop,
    .cand_valid, .cand_id, .cand_a, .cand_take,
    .vm_valid, .vm_op, .vm_a, .vm_id, .vm_done, .vm_fired,
    .dbg_a, .dbg_kind(dbg_mkind), .dbg_v(dbg_mv), .dbg_own_v(dbg_mown_v), .dbg_own(dbg_mown),
    .frtag_valid, .fr_busy, .stq_nonempty, .ev(ev_mem)
  );
endmodule
