// network: message passing between the cache sites and the memory site.
//
// Four movers work in parallel, each moving at most one message per cycle:
//   HPS  - high-priority passing: the head of one non-empty HOUT, chosen
//          round-robin, moves into HIN when HIN is not full.
//   FRC/LPS - low-priority passing under the fairness controller FRCRT: when
//          FRCRT is free it latches the next site (round-robin) whose LOUT
//          is not empty; that site's LOUT head is then offered to LIN and,
//          once LIN takes it, FRCRT is freed. One site at a time thus gets
//          the LIN entry, so no site can be locked out of memory.
//   MPS  - memory-to-cache passing: the OUT head moves into the IN queue of
//          the site it names when that IN is not full.
//          The IN queues all see the OUT head on one shared in_msg bus
//          (a wire from out_msg); only the per-site push picks the receiver.
//   FRT  - a pointer walks over all (site, tag slot) pairs; a valid request
//          tag under the pointer is offered as FRTAG candidate and the
//          pointer moves on when the slot is empty or the candidate is taken.
//
// Interface: per-site HOUT/LOUT heads with pops, per-site IN push with the
// IN full flags, per-site request tags; memory side HIN push, LIN offer
// (lin_req, lin_msg, lin_ready), OUT head with pop, FRTAG candidate port.
// frcrt_valid/frcrt_id show the fairness controller.
//
// The movers and FRCRT follow the protocol's message passing rules; the
// round-robin orders and the tag-scanning pointer are this design's choice.
module network #(
  parameter int P     = 256,
  parameter int N     = 16,
  parameter int V_W   = 32,
  parameter int RQMAX = 2,
  localparam int ID_W  = (P > 1) ? $clog2(P) : 1,
  localparam int A_W   = (N > 1) ? $clog2(N) : 1,
  localparam int MSG_W = 5 + ID_W + A_W + 1 + V_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // cache sites
  input  logic [P-1:0]                       hout_valid,
  input  logic [P-1:0][MSG_W-1:0]            hout_msg,
  output logic [P-1:0]                       hout_pop,
  input  logic [P-1:0]                       lout_valid,
  input  logic [P-1:0][MSG_W-1:0]            lout_msg,
  output logic [P-1:0]                       lout_pop,
  input  logic [P-1:0]                       in_full,
  output logic [P-1:0]                       in_push,
  output logic [MSG_W-1:0]                   in_msg,
  input  logic [P-1:0][RQMAX-1:0]            tags_valid,
  input  logic [P-1:0][RQMAX-1:0][A_W-1:0]   tags_a,
  // memory site
  output logic                               hin_push,
  output logic [MSG_W-1:0]                   hin_msg,
  input  logic                               hin_full,
  output logic                               lin_req,
  output logic [MSG_W-1:0]                   lin_msg,
  input  logic                               lin_ready,
  input  logic                               out_valid,
  input  logic [MSG_W-1:0]                   out_msg,
  output logic                               out_pop,
  output logic                               cand_valid,
  output logic [ID_W-1:0]                    cand_id,
  output logic [A_W-1:0]                     cand_a,
  input  logic                               cand_take,
  // observation
  output logic                               frcrt_valid,
  output logic [ID_W-1:0]                    frcrt_id
);
  localparam int SL   = P * RQMAX;
  localparam int SL_W = (SL > 1) ? $clog2(SL) : 1;

  // first set bit at or after position start+1, wrapping
  function automatic logic [ID_W:0] rr_pick(logic [P-1:0] req, logic [ID_W-1:0] start);
    logic [ID_W:0] r;
    r = '0;
    for (int k = P; k >= 1; k--) begin
      int j;
      j = (int'(start) + k) % P;
      if (req[j]) r = {1'b1, ID_W'(j)};
    end
    return r;
  endfunction

  // ---------------- HPS ----------------
  logic [ID_W-1:0] h_last_q;
  logic [ID_W:0]   h_pick;
  assign h_pick   = rr_pick(hout_valid, h_last_q);
  assign hin_push = h_pick[ID_W] && !hin_full;
  assign hin_msg  = hout_msg[h_pick[ID_W-1:0]];
  always_comb begin
    hout_pop = '0;
    if (hin_push) hout_pop[h_pick[ID_W-1:0]] = 1'b1;
  end

  // ---------------- FRC / LPS ----------------
  logic            frc_v_q;
  logic [ID_W-1:0] frc_id_q, l_last_q;
  logic [ID_W:0]   l_pick;
  assign l_pick  = rr_pick(lout_valid, l_last_q);
  assign lin_req = frc_v_q && lout_valid[frc_id_q];
  assign lin_msg = lout_msg[frc_id_q];
  always_comb begin
    lout_pop = '0;
    if (lin_req && lin_ready) lout_pop[frc_id_q] = 1'b1;
  end
  assign frcrt_valid = frc_v_q;
  assign frcrt_id    = frc_id_q;

  // ---------------- MPS ----------------
  logic [ID_W-1:0] dest;
  assign dest    = out_msg[MSG_W-6 -: ID_W];
  assign in_msg  = out_msg;
  assign out_pop = out_valid && !in_full[dest];
  always_comb begin
    in_push = '0;
    if (out_pop) in_push[dest] = 1'b1;
  end

  // ---------------- FRT ----------------
  logic [SL_W-1:0] ptr_q;
  logic [ID_W-1:0] ptr_site;
  int unsigned     ptr_slot;
  assign ptr_site   = ID_W'(int'(ptr_q) / RQMAX);
  assign ptr_slot   = int'(ptr_q) % RQMAX;
  assign cand_valid = tags_valid[ptr_site][ptr_slot];
  assign cand_id    = ptr_site;
  assign cand_a     = tags_a[ptr_site][ptr_slot];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_last_q <= ID_W'(P - 1);
      l_last_q <= ID_W'(P - 1);
      frc_v_q  <= 1'b0;
      frc_id_q <= '0;
      ptr_q    <= '0;
    end else begin
      if (hin_push) h_last_q <= h_pick[ID_W-1:0];
      if (!frc_v_q) begin
        if (l_pick[ID_W]) begin
          frc_v_q  <= 1'b1;
          frc_id_q <= l_pick[ID_W-1:0];
          l_last_q <= l_pick[ID_W-1:0];
        end
      end else if (lin_req && lin_ready) begin
        frc_v_q <= 1'b0;
      end
      if (!cand_valid || cand_take)
        ptr_q <= (int'(ptr_q) == SL - 1) ? '0 : ptr_q + 1'b1;
    end
  end
endmodule
