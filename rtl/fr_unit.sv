// fr_unit: first priority request register (FR) and its tag (FRTAG).
//
// FRTAG reserves FR for one outstanding request, named by (site id,
// address). While FRTAG is empty, the network offers a candidate taken from
// the request tags of the caches; fr_unit loads it (cand_take pulses). When
// the request named by FRTAG reaches the head of LIN and FR is empty, the
// memory engine moves it into FR (fr_load) and FRTAG becomes empty again.
// FR holds one full message (MSG_W bits) until the engine serves it
// (fr_clear). erase_valid with (erase_id, erase_a) clears FRTAG only if it
// holds exactly that pair (Erase-(id,a) action); tag_clear clears it
// unconditionally (move into FR). Every change takes effect at the next
// clock edge.
//
// The registers and the erase rule follow the protocol's fairness units.
// Loading FRTAG only when it is empty and preferring an erase over a load in
// the same cycle are this design's choices.
module fr_unit #(
  parameter int P     = 256,
  parameter int N     = 16,
  parameter int MSG_W = 8,
  localparam int ID_W = (P > 1) ? $clog2(P) : 1,
  localparam int A_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // FRTAG candidate from the caches' request tags
  input  logic             cand_valid,
  input  logic [ID_W-1:0]  cand_id,
  input  logic [A_W-1:0]   cand_a,
  output logic             cand_take,
  // FRTAG
  output logic             tag_valid,
  output logic [ID_W-1:0]  tag_id,
  output logic [A_W-1:0]   tag_a,
  input  logic             erase_valid,
  input  logic [ID_W-1:0]  erase_id,
  input  logic [A_W-1:0]   erase_a,
  input  logic             tag_clear,
  // FR
  output logic             fr_valid,
  output logic [MSG_W-1:0] fr_msg,
  input  logic             fr_load,
  input  logic [MSG_W-1:0] fr_load_msg,
  input  logic             fr_clear
);
  logic erase_hit;
  assign erase_hit = erase_valid && tag_valid && erase_id == tag_id && erase_a == tag_a;
  assign cand_take = cand_valid && !tag_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_valid <= 1'b0;
      tag_id    <= '0;
      tag_a     <= '0;
      fr_valid  <= 1'b0;
      fr_msg    <= '0;
    end else begin
      if (erase_hit || (tag_clear && tag_valid)) begin
        tag_valid <= 1'b0;
      end else if (cand_take) begin
        tag_valid <= 1'b1;
        tag_id    <= cand_id;
        tag_a     <= cand_a;
      end
      if (fr_load && !fr_valid) begin
        fr_valid <= 1'b1;
        fr_msg   <= fr_load_msg;
      end else if (fr_clear) begin
        fr_valid <= 1'b0;
      end
    end
  end

  a_load_into_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                      fr_load |-> !fr_valid)
    else $error("fr_unit: FR loaded while occupied");
endmodule
