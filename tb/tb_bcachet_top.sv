// tb_bcachet_top: end-to-end test of a four-site BCachet system with one
// directory entry pair, one GM entry and a one-entry stalled queue, so that
// every buffer-management mechanism is forced to act.
//
// Phase 1 (directed): site 0 stores and commits a value; site 1 reconciles
// and loads it and must see it. Site 2 loads an address while memory sends
// it a Cache_w on its own, which must lock the line (a locked state) and
// still return the memory value.
// Phase 2 (random): every site runs a random instruction stream (Loadl,
// Storel, Commit, Reconcile, Fence) over four addresses, with random
// voluntary cache and memory rule requests. Every instruction must retire
// (in order, with its tag); every loaded value must be 0 or a value some
// site stored to that address (values carry their address in the top byte).
// At the end the test counts how often each mechanism fired (stall into
// STQ, Nack, FR load and service, GM suspension, WbAck, DownReq, CacheAck
// with and without value, voluntary rules, locked states, release of a
// held message, re-sent request) and fails for any that never happened.
//
// Interface timing follows bcachet_top: inputs are driven on the falling
// edge and sampled on the rising edge. The sizes are this test's choice.
module tb_bcachet_top;
  import bcachet_pkg::*;
  localparam int P = 4, N = 4, V_W = 32, RQMAX = 2, TAG_W = 4;
  localparam int ID_W = 2, A_W = 2;
  localparam int OPS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0]            req_valid, req_ready, rsp_valid, rsp_pop;
  logic [P-1:0][2:0]       req_op;
  logic [P-1:0][TAG_W-1:0] req_tag, rsp_tag;
  logic [P-1:0][A_W-1:0]   req_a;
  logic [P-1:0][V_W-1:0]   req_v, rsp_v;
  logic [P-1:0]            vc_valid, vc_done, vc_fired;
  logic [P-1:0][2:0]       vc_op;
  logic [P-1:0][A_W-1:0]   vc_a;
  logic                    vm_valid, vm_done, vm_fired;
  logic [2:0]              vm_op;
  logic [A_W-1:0]          vm_a, dbg_a;
  logic [ID_W-1:0]         vm_id, dbg_site, dbg_mown, frcrt_id;
  logic [3:0]              dbg_cs;
  logic [V_W-1:0]          dbg_cv, dbg_mv;
  logic [2:0]              dbg_mkind;
  logic                    dbg_mown_v, frtag_valid, fr_busy, stq_nonempty, frcrt_valid;
  logic [NUM_MEV-1:0]      ev_mem;
  logic [P-1:0][3:0]       ev_cache;
  logic [P-1:0][1:0]       rqcnt;

  bcachet_top #(.P(P), .N(N), .V_W(V_W), .RQMAX(RQMAX), .TAG_W(TAG_W),
                .STQ_SIZE(1), .DIR_SIZE(2), .GM_SIZE(1)) dut (
    .clk, .rst_n,
    .proc_req_valid(req_valid), .proc_req_op(req_op), .proc_req_tag(req_tag),
    .proc_req_a(req_a), .proc_req_v(req_v), .proc_req_ready(req_ready),
    .proc_rsp_valid(rsp_valid), .proc_rsp_tag(rsp_tag), .proc_rsp_v(rsp_v),
    .proc_rsp_pop(rsp_pop),
    .vc_valid, .vc_op, .vc_a, .vc_done, .vc_fired,
    .vm_valid, .vm_op, .vm_a, .vm_id, .vm_done, .vm_fired,
    .dbg_site, .dbg_a, .dbg_cs, .dbg_cv, .dbg_mkind, .dbg_mv, .dbg_mown_v, .dbg_mown,
    .frtag_valid, .fr_busy, .stq_nonempty, .frcrt_valid, .frcrt_id, .rqcnt,
    .ev_mem, .ev_cache
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected responses per site, in order
  logic [2:0]       eq_op  [P][16];
  logic [A_W-1:0]   eq_a   [P][16];
  logic [TAG_W-1:0] eq_tag [P][16];
  int head [P], tail [P];
  int issued [P], retired [P];
  int seqn = 1;
  logic [V_W-1:0] last_load [P];

  // response collector: always pops
  assign rsp_pop = rsp_valid;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < P; s++) if (rsp_valid[s]) begin
      if (head[s] == tail[s]) check(1'b0, $sformatf("site %0d: response with none expected", s));
      else begin
        int h;
        h = head[s] % 16;
        check(rsp_tag[s] == eq_tag[s][h], $sformatf("site %0d: tag %0d, expected %0d", s, rsp_tag[s], eq_tag[s][h]));
        if (eq_op[s][h] == OP_LOADL) begin
          last_load[s] = rsp_v[s];
          check(rsp_v[s] == '0 || rsp_v[s][31:24] == 8'(eq_a[s][h]),
                $sformatf("site %0d: load of a=%0d returned %h", s, eq_a[s][h], rsp_v[s]));
        end
        head[s]++;
        retired[s]++;
      end
    end
  end

  // mechanism counters
  int mev_cnt [NUM_MEV];
  int cev_cnt [4];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NUM_MEV; i++) if (ev_mem[i]) mev_cnt[i]++;
    for (int s = 0; s < P; s++) for (int i = 0; i < 4; i++) if (ev_cache[s][i]) cev_cnt[i]++;
  end
  int frc_cnt = 0;
  always @(posedge clk) if (rst_n && frcrt_valid) frc_cnt++;

  task automatic issue(int s, logic [2:0] op, logic [A_W-1:0] a, logic [V_W-1:0] v);
    int t;
    while (tail[s] - head[s] >= 8) @(negedge clk);
    t = tail[s] % 16;
    eq_op[s][t] = op; eq_a[s][t] = a; eq_tag[s][t] = TAG_W'(tail[s]);
    req_valid[s] = 1'b1; req_op[s] = op; req_a[s] = a; req_v[s] = v; req_tag[s] = TAG_W'(tail[s]);
    tail[s]++;
    issued[s]++;
    @(posedge clk);
    while (!req_ready[s]) @(posedge clk);
    @(negedge clk);
    req_valid[s] = 1'b0;
  endtask

  // one voluntary cache rule request, held until done
  task automatic vol_cache(int s, logic [2:0] op, logic [A_W-1:0] a);
    vc_valid[s] = 1'b1; vc_op[s] = op; vc_a[s] = a;
    @(posedge clk);
    while (!vc_done[s]) @(posedge clk);
    @(negedge clk);
    vc_valid[s] = 1'b0;
  endtask

  task automatic drain(int s);
    int n;
    n = 0;
    while (head[s] != tail[s] && n < 20000) begin @(negedge clk); n++; end
    check(head[s] == tail[s], $sformatf("site %0d: instructions did not retire", s));
  endtask

  function automatic logic [V_W-1:0] mkval(logic [A_W-1:0] a);
    seqn++;
    return {8'(a), 24'(seqn)};
  endfunction

  // random instruction stream of one site
  task automatic run_site(int s);
    for (int k = 0; k < OPS; k++) begin
      int r;
      logic [A_W-1:0] a;
      r = $urandom_range(0, 99);
      a = A_W'($urandom_range(0, N - 1));
      if      (r < 30) issue(s, OP_LOADL, a, '0);
      else if (r < 55) issue(s, OP_STOREL, a, mkval(a));
      else if (r < 75) issue(s, OP_COMMIT, a, '0);
      else if (r < 92) issue(s, OP_RECONCILE, a, '0);
      else             issue(s, OP_FENCE, a, '0);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(negedge clk);
    end
  endtask

  // hot-address stream: stores and commits to address 0 with no gaps
  task automatic run_hot(int s);
    for (int k = 0; k < OPS; k++) begin
      issue(s, OP_STOREL, 2'd0, mkval(2'd0));
      issue(s, OP_COMMIT, 2'd0, '0);
      if ($urandom_range(0, 1) == 0) begin
        issue(s, OP_RECONCILE, 2'd0, '0);
        issue(s, OP_LOADL, 2'd0, '0);
      end
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
  endtask

  bit rand_vol = 1'b0;
  bit hot = 1'b0;
  // random voluntary rule requests, each held until done
  always @(negedge clk) if (rst_n && rand_vol) begin
    for (int s = 0; s < P; s++) begin
      if (vc_valid[s] && vc_done[s]) vc_valid[s] <= 1'b0;
      else if (!vc_valid[s] && $urandom_range(0, 15) == 0) begin
        vc_valid[s] <= 1'b1;
        vc_op[s]    <= 3'($urandom_range(0, 5));
        vc_a[s]     <= A_W'($urandom_range(0, N - 1));
      end
    end
    if (vm_valid && vm_done) vm_valid <= 1'b0;
    else if (!vm_valid && (hot || $urandom_range(0, 7) == 0)) begin
      vm_valid <= 1'b1;
      vm_op    <= (hot || $urandom_range(0, 1) == 0) ? 3'(VM_CACHE_W) : 3'($urandom_range(0, 6));
      vm_a     <= hot ? 2'd0 : A_W'($urandom_range(0, N - 1));
      vm_id    <= ID_W'($urandom_range(0, P - 1));
    end
  end

  initial begin : watchdog
    #20_000_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [V_W-1:0] v0;
    req_valid = '0; req_op = '0; req_tag = '0; req_a = '0; req_v = '0;
    vc_valid = '0; vc_op = '0; vc_a = '0;
    vm_valid = 1'b0; vm_op = '0; vm_a = '0; vm_id = '0;
    dbg_site = '0; dbg_a = '0;
    for (int s = 0; s < P; s++) begin head[s] = 0; tail[s] = 0; issued[s] = 0; retired[s] = 0; last_load[s] = '0; end
    for (int i = 0; i < NUM_MEV; i++) mev_cnt[i] = 0;
    for (int i = 0; i < 4; i++) cev_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- phase 1a: store, commit, then another site reads it ----
    v0 = mkval(2'd1);
    issue(0, OP_STOREL, 2'd1, v0);
    issue(0, OP_COMMIT, 2'd1, '0);
    drain(0);
    dbg_a = 2'd1; #1;
    check(dbg_mv == v0, "memory holds the committed value");
    issue(1, OP_RECONCILE, 2'd1, '0);
    issue(1, OP_LOADL, 2'd1, '0);
    drain(1);
    check(last_load[1] == v0, $sformatf("site 1 read %h, expected %h", last_load[1], v0));

    // ---- phase 1b: Cache_w overtakes the CacheAck: locked state; a
    //      downgrade requested meanwhile is held and released later ----
    for (int t = 0; t < 90; t++) begin
      int s;
      logic [A_W-1:0] a;
      int dly;
      s = 1 + (t % 3);
      a = A_W'(1 + (t / 3) % 3);
      dly = t % 9;
      vol_cache(s, VC_DOWN_WB, a);   // leave the directory if still a sharer
      repeat (10) @(negedge clk);
      issue(s, OP_RECONCILE, a, '0);
      drain(s);
      fork
        issue(s, OP_LOADL, a, '0);
        begin
          for (int k = 0; k < 60 && !(vc_done[s] && vc_fired[s]); k++) begin
            vc_valid[s] = 1'b1; vc_op[s] = VC_DOWN_WB; vc_a[s] = a;
            @(posedge clk);
            @(negedge clk);
          end
          vc_valid[s] = 1'b0;
        end
        begin
          repeat (dly) @(negedge clk);
          vm_valid = 1'b1; vm_op = VM_CACHE_W; vm_a = a; vm_id = ID_W'(s);
          @(posedge clk);
          while (!vm_done) @(posedge clk);
          @(negedge clk);
          // a DownReq that reaches the locked line is held until the CacheAck
          if (t % 2 == 1) begin
            vm_op = VM_DOWNREQ_WB;
            @(posedge clk);
            while (!vm_done) @(posedge clk);
            @(negedge clk);
          end
          vm_valid = 1'b0;
        end
      join
      drain(s);
      if (a == 2'd1) check(last_load[s] == v0, $sformatf("site %0d read %h, expected %h", s, last_load[s], v0));
    end
    check(cev_cnt[0] > 0, "line entered a locked state");

    // ---- phase 1c: three sharers, then four writers at once: the
    //      writers find GM full and are stalled or refused ----
    for (int t = 0; t < 6; t++) begin
      logic [A_W-1:0] a;
      a = A_W'(2 + t % 2);
      for (int s = 0; s < P; s++) begin
        vol_cache(s, VC_DOWN_WB, a);
        issue(s, OP_COMMIT, a, '0);
        issue(s, OP_RECONCILE, a, '0);
      end
      for (int s = 0; s < P; s++) drain(s);
      for (int s = 1; s < P; s++) begin
        vm_valid = 1'b1; vm_op = VM_CACHE_W; vm_a = a; vm_id = ID_W'(s);
        @(posedge clk);
        while (!vm_done) @(posedge clk);
        @(negedge clk);
        vm_valid = 1'b0;
      end
      repeat (10) @(negedge clk);
      fork
        begin issue(0, OP_STOREL, a, mkval(a)); issue(0, OP_COMMIT, a, '0); end
        begin issue(1, OP_STOREL, a, mkval(a)); issue(1, OP_COMMIT, a, '0); end
        begin issue(2, OP_STOREL, a, mkval(a)); issue(2, OP_COMMIT, a, '0); end
        begin issue(3, OP_STOREL, a, mkval(a)); issue(3, OP_COMMIT, a, '0); end
      join
      for (int s = 0; s < P; s++) drain(s);
    end
    check(mev_cnt[MEV_STQ_PUSH] > 0, "a request was stalled");

    // ---- phase 2: random streams on all sites ----
    rand_vol = 1'b1;
    fork
      run_site(0);
      run_site(1);
      run_site(2);
      run_site(3);
    join
    for (int s = 0; s < P; s++) drain(s);
    // ---- phase 3: all sites fight over one address ----
    hot = 1'b1;
    fork
      run_hot(0);
      run_hot(1);
      run_hot(2);
      run_hot(3);
    join
    for (int s = 0; s < P; s++) drain(s);
    hot = 1'b0;
    rand_vol = 1'b0;
    @(negedge clk);
    vc_valid = '0; vm_valid = 1'b0;
    repeat (200) @(negedge clk);
    for (int s = 0; s < P; s++) begin
      check(retired[s] == issued[s], $sformatf("site %0d retired %0d of %0d", s, retired[s], issued[s]));
      check(rqcnt[s] == '0, $sformatf("site %0d: requests still outstanding", s));
    end
    check(!stq_nonempty && !fr_busy, "memory queues idle at the end");

    // ---- mechanisms ----
    $display("mechanisms: stq=%0d cachenack=%0d wbnack=%0d frload=%0d frserve=%0d gm=%0d wback=%0d downreq=%0d ackv=%0d ackd=%0d vol=%0d erfrtag=%0d frcrt=%0d",
             mev_cnt[MEV_STQ_PUSH], mev_cnt[MEV_CACHENACK], mev_cnt[MEV_WBNACK], mev_cnt[MEV_FR_LOAD],
             mev_cnt[MEV_FR_SERVE], mev_cnt[MEV_GM_SUSPEND], mev_cnt[MEV_WBACK], mev_cnt[MEV_DOWNREQ],
             mev_cnt[MEV_CACHEACK_V], mev_cnt[MEV_CACHEACK_D], mev_cnt[MEV_VOLUNTARY], mev_cnt[MEV_ERFRTAG], frc_cnt);
    $display("cache: locked=%0d released=%0d resent=%0d rqblocked=%0d", cev_cnt[0], cev_cnt[1], cev_cnt[2], cev_cnt[3]);
    // CacheNack and WbNack are two faces of one mechanism (Stall-or-Nack)
    for (int i = 0; i < NUM_MEV; i++)
      if (i != MEV_ERFRTAG && i != MEV_CACHENACK && i != MEV_WBNACK)
        check(mev_cnt[i] > 0, $sformatf("memory mechanism %0d never happened", i));
    check(mev_cnt[MEV_CACHENACK] + mev_cnt[MEV_WBNACK] > 0, "no Nack");
    check(cev_cnt[0] > 0, "no locked state");
    check(cev_cnt[1] > 0, "no held message released");
    check(cev_cnt[2] > 0, "no request re-sent after Nack");
    check(frc_cnt > 0, "fairness controller never used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
