// tb_omega_algos: the remaining families of vertex updates run end to end on
// the full 16-node subsystem at its default size (no parameter overrides).
//
// tb_omega_top covers floating-point add, parent claims and signed min. This
// testbench loads its own micro-programs over the configuration bus, as a
// framework would for each application, and runs three more kernels on a
// random graph whose destinations are skewed towards low vertex IDs:
//   1. Degree count (the signed-add updates of triangle and k-core counting):
//      every edge adds +2 or -1 to a 4-byte counter of its destination.
//      Destinations beyond the resident range come back flagged for the cache
//      path and are counted by the core model.
//   2. Connected components: label propagation with unsigned-min updates on
//      an undirected graph. Source labels are read with source reads, the
//      next frontier is collected from the dense active bits.
//   3. Radii: multi-source BFS with 8 sources kept as bit masks. Each vertex
//      is a 12-byte struct {next_visited, radius, visited} of three 4-byte
//      fields sharing a 12-byte stride, so all three Props live in one line.
//      The update ORs the source's visited mask into next_visited and, when
//      that changes it, writes the current round (a PISC global register) to
//      radius and sets the active bit.
// Every result is compared with a reference computed in the testbench; the
// mechanisms used (cache path, remote accesses, buffer hits, atomics, dense
// active bits, held-back requests, global-register updates) are counted and
// one that never occurs is a failure. The kernels, sizes and micro-programs
// are this testbench's; the update rules follow the algorithms' definitions.
// Timing is checked in the block testbenches; a watchdog ends a hung run.
module tb_omega_algos;
  import omega_pkg::*;
  import omega_tb_pkg::*;
  localparam int N = NUM_NODES;
  localparam int V = 320, NV = 256, E = 600, CH = 8, K = 8;

  logic clk = 0, rst_n = 0, init_done;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [63:0] cfg_wdata = 0;
  logic iter_end = 0;
  logic      [N-1:0] core_req_valid, core_req_ready, core_to_cache, core_resp_valid;
  core_req_t [N-1:0] core_req;
  logic      [N-1:0][DATA_W-1:0] core_resp_data;
  logic      [N-1:0] push_valid;
  logic      [N-1:0][VID_W-1:0] push_vid;
  ev_t       [N-1:0] ev;

  omega_top dut (.clk, .rst_n, .init_done, .cfg_we, .cfg_addr, .cfg_wdata, .iter_end,
                 .core_req_valid, .core_req_ready, .core_req, .core_to_cache,
                 .core_resp_valid, .core_resp_data, .push_valid, .push_ready('1), .push_vid, .ev);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ event counters
  int c_cache = 0, c_remote = 0, c_hit = 0, c_atomic = 0, c_block = 0, c_act = 0, c_glob = 0;
  bit busy_seen;
  always @(posedge clk) if (rst_n) begin
    busy_seen = 0;
    for (int n = 0; n < N; n++) begin
      c_cache  += ev[n].to_cache;
      c_remote += ev[n].remote_acc;
      c_hit    += ev[n].svb_hit;
      c_atomic += ev[n].atomic;
      c_block  += ev[n].block;
      if (ev[n] != '0) busy_seen = 1;
    end
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // one core request from node n; reads wait for their reply
  task automatic creq(input int n, input op_e op, input logic [47:0] a, input logic [63:0] d,
                      input int t, output bit tc, output logic [63:0] rdata);
    @(negedge clk);
    core_req_valid[n] = 1;
    core_req[n].op = op; core_req[n].addr = a; core_req[n].data = d; core_req[n].optype = OPT_W'(t);
    #1;
    while (!core_req_ready[n]) begin @(negedge clk); #1; end
    tc = core_to_cache[n];
    @(negedge clk);
    core_req_valid[n] = 0;
    rdata = '0;
    if (!tc && op != OP_WR && op != OP_ATOMIC) begin
      while (!core_resp_valid[n]) @(negedge clk);
      rdata = core_resp_data[n];
    end
  endtask

  task automatic quiesce();
    int idle;
    idle = 0;
    while (idle < 60) begin
      @(negedge clk);
      idle = busy_seen ? 0 : idle + 1;
    end
  endtask

  task automatic pulse_iter_end();
    @(negedge clk); iter_end = 1; @(negedge clk); iter_end = 0;
  endtask

  // ----------------------------------------------------------- programs
  // Type 0 (Radii): R1 = next_visited; R2 = R1 | mask; if R2 != R1
  //                 { next_visited = R2; radius = G2; activate }
  // Type 1 (add):   count = count + operand (sign-extended 4-byte Prop)
  // Type 2 (CC):    if operand < label (unsigned) { label = operand; activate }
  localparam logic [47:0] B = 48'h7000_0000;  // Radii struct {next, radius, visited}
  localparam int T_RAD = 0, T_ADD = 1, T_LBL = 2;
  function automatic logic [63:0] my_prog(int j);
    case (j)
      0:  return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0);
      1:  return uop(U_ALU, PR_AL, F_OR,  2, 1, 0);
      2:  return uop(U_CMP, PR_AL, F_ADD, 0, 2, 1);          // not equal
      3:  return uop(U_END, PR_F);
      4:  return uop(U_STP, PR_AL, F_MOV, 0, 2, 0, 0);
      5:  return uop(U_LDG, PR_AL, F_MOV, 3, 0, 0, 2);
      6:  return uop(U_STP, PR_AL, F_MOV, 0, 3, 0, 1);
      7:  return uop(U_SETACT, PR_AL, F_MOV, 0, 0, 0, 0);
      8:  return uop(U_END);
      10: return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0, 1);
      11: return uop(U_ALU, PR_AL, F_ADD, 1, 1, 0);
      12: return uop(U_STP, PR_AL, F_MOV, 0, 1, 0, 0);
      13: return uop(U_END);
      16: return uop(U_LDP, PR_AL, F_MOV, 1, 0, 0, 0);
      17: return uop(U_CMP, PR_AL, F_UMIN, 0, 0, 1);         // unsigned less
      18: return uop(U_END, PR_F);
      19: return uop(U_STP, PR_AL, F_MOV, 0, 0, 0, 0);
      20: return uop(U_SETACT, PR_AL, F_MOV, 0, 0, 0, 0);
      default: return uop(U_END);
    endcase
  endfunction

  // ----------------------------------------------------------------- graph
  int es [E], ed [E];

  function automatic logic [47:0] A(input logic [47:0] base, input int stride, input int v);
    return base + 48'(stride * v);
  endfunction

  initial begin
    bit tc;
    logic [63:0] d;
    core_req_valid = '0; core_req = '0;
    for (int e = 0; e < E; e++) begin
      real u;
      u = real'($urandom_range(0, 99999)) / 100000.0;
      es[e] = $urandom_range(0, V - 1);
      ed[e] = int'($floor(real'(V) * u * u));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < UCODE_DEPTH; j++) wr(CFG_UCODE + 8'(j), my_prog(j));
    wr(CFG_ENTRY + T_RAD, 0); wr(CFG_ENTRY + T_ADD, 10); wr(CFG_ENTRY + T_LBL, 16);
    wr(CFG_NVERT, NV); wr(CFG_CHUNK, CH);
    while (!init_done) @(negedge clk);
    $display("scratchpads cleared after %0d cycles", cyc);

    // =================================================== 1. degree count
    begin
      int exp_cnt [V];
      int cache_cnt [V];
      foreach (exp_cnt[v]) begin exp_cnt[v] = 0; cache_cnt[v] = 0; end
      for (int e = 0; e < E; e++) exp_cnt[ed[e]] += (e % 3 == 0) ? -1 : 2;
      wr(CFG_START, 64'h5000_0000); wr(CFG_TSIZE, 4); wr(CFG_STRIDE, 4); wr(CFG_NPROPS, 1);
      for (int n = 0; n < N; n++) begin
        fork
          automatic int nn = n;
          begin
            automatic bit t1; automatic logic [63:0] r1;
            for (int e = nn; e < E; e += N) begin
              automatic int inc;
              inc = (e % 3 == 0) ? -1 : 2;
              creq(nn, OP_ATOMIC, A(48'h5000_0000, 4, ed[e]), 64'(signed'(inc)), T_ADD, t1, r1);
              if (t1) cache_cnt[ed[e]] += inc;
            end
          end
        join_none
      end
      wait fork;
      quiesce();
      for (int v = 0; v < V; v++) begin
        creq((v * 7) % N, OP_RD, A(48'h5000_0000, 4, v), 0, 0, tc, d);
        chk($sformatf("degree path v%0d", v), 64'(tc), 64'(v >= NV));
        if (v < NV) chk($sformatf("degree v%0d", v), d, {32'd0, 32'(exp_cnt[v])});
        else        chk($sformatf("degree cached v%0d", v), 64'(cache_cnt[v]), 64'(exp_cnt[v]));
      end
    end

    // ========================================= 2. connected components
    begin
      int ref_l [NV];
      bit front [NV];
      bit any;
      int rounds;
      for (int v = 0; v < NV; v++) ref_l[v] = v;
      any = 1;
      while (any) begin
        any = 0;
        for (int e = 0; e < E; e++)
          if (es[e] < NV && ed[e] < NV) begin
            if (ref_l[es[e]] < ref_l[ed[e]]) begin ref_l[ed[e]] = ref_l[es[e]]; any = 1; end
            if (ref_l[ed[e]] < ref_l[es[e]]) begin ref_l[es[e]] = ref_l[ed[e]]; any = 1; end
          end
      end
      wr(CFG_START, 64'h6000_0000); wr(CFG_TSIZE, 4); wr(CFG_STRIDE, 4); wr(CFG_NPROPS, 1);
      for (int v = 0; v < NV; v++) begin
        creq(v % N, OP_WR, A(48'h6000_0000, 4, v), 64'(v), 0, tc, d);
        front[v] = 1;
      end
      rounds = 0;
      any = 1;
      while (any && rounds < 40) begin
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int e = nn; e < E; e += N)
                if (es[e] < NV && ed[e] < NV) begin
                  if (front[es[e]]) begin
                    creq(nn, OP_RD_SRC, A(48'h6000_0000, 4, es[e]), 0, 0, t1, r1);
                    creq(nn, OP_ATOMIC, A(48'h6000_0000, 4, ed[e]), r1, T_LBL, t1, r1);
                  end
                  if (front[ed[e]]) begin
                    creq(nn, OP_RD_SRC, A(48'h6000_0000, 4, ed[e]), 0, 0, t1, r1);
                    creq(nn, OP_ATOMIC, A(48'h6000_0000, 4, es[e]), r1, T_LBL, t1, r1);
                  end
                end
            end
          join_none
        end
        wait fork;
        quiesce();
        pulse_iter_end();
        any = 0;
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int v = nn; v < NV; v += N) begin
                creq(nn, OP_RD_ACT, A(48'h6000_0000, 4, v), 0, 0, t1, r1);
                front[v] = r1[0];
                if (r1[0]) begin any = 1; c_act++; end
              end
            end
          join_none
        end
        wait fork;
        rounds++;
      end
      $display("CC converged after %0d rounds at cycle %0d", rounds, cyc);
      chk("CC converged", 64'(any), 0);
      for (int v = 0; v < NV; v++) begin
        creq((v * 5) % N, OP_RD, A(48'h6000_0000, 4, v), 0, 0, tc, d);
        chk($sformatf("cc v%0d", v), d, 64'(ref_l[v]));
      end
    end

    // ============================================================ 3. Radii
    begin
      int unsigned r_vis [NV], r_next [NV], r_rad [NV];
      bit front [NV];
      bit any;
      int round;
      wr(CFG_START + 0, 64'(B));     wr(CFG_TSIZE + 0, 4); wr(CFG_STRIDE + 0, 12);
      wr(CFG_START + 1, 64'(B + 4)); wr(CFG_TSIZE + 1, 4); wr(CFG_STRIDE + 1, 12);
      wr(CFG_START + 2, 64'(B + 8)); wr(CFG_TSIZE + 2, 4); wr(CFG_STRIDE + 2, 12);
      wr(CFG_NPROPS, 3);
      for (int v = 0; v < NV; v++) begin
        int unsigned m;
        m = (v % 29 == 3 && v / 29 < K) ? (32'd1 << (v / 29)) : 0;
        r_vis[v] = m; r_next[v] = m; r_rad[v] = 0;
        front[v] = (m != 0);
        creq(v % N, OP_WR, A(B,     12, v), 64'(m), 0, tc, d);
        creq(v % N, OP_WR, A(B + 4, 12, v), 64'd0,  0, tc, d);
        creq(v % N, OP_WR, A(B + 8, 12, v), 64'(m), 0, tc, d);
      end
      round = 0;
      any = 1;
      while (any && round < 40) begin
        round++;
        wr(CFG_GLOBAL + 2, 64'(round));
        c_glob++;
        // reference round
        for (int e = 0; e < E; e++)
          if (es[e] < NV && ed[e] < NV) begin
            if (front[es[e]]) r_next[ed[e]] |= r_vis[es[e]];
            if (front[ed[e]]) r_next[es[e]] |= r_vis[ed[e]];
          end
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int e = nn; e < E; e += N)
                if (es[e] < NV && ed[e] < NV) begin
                  if (front[es[e]]) begin
                    creq(nn, OP_RD_SRC, A(B + 8, 12, es[e]), 0, 0, t1, r1);
                    creq(nn, OP_ATOMIC, A(B, 12, ed[e]), r1, T_RAD, t1, r1);
                  end
                  if (front[ed[e]]) begin
                    creq(nn, OP_RD_SRC, A(B + 8, 12, ed[e]), 0, 0, t1, r1);
                    creq(nn, OP_ATOMIC, A(B, 12, es[e]), r1, T_RAD, t1, r1);
                  end
                end
            end
          join_none
        end
        wait fork;
        quiesce();
        pulse_iter_end();
        // collect: active vertices copy next_visited into visited
        any = 0;
        for (int n = 0; n < N; n++) begin
          fork
            automatic int nn = n;
            begin
              automatic bit t1; automatic logic [63:0] r1;
              for (int v = nn; v < NV; v += N) begin
                automatic bit exp_act;
                exp_act = (r_next[v] != r_vis[v]);
                creq(nn, OP_RD_ACT, A(B, 12, v), 0, 0, t1, r1);
                chk($sformatf("radii round %0d active v%0d", round, v), 64'(r1[0]), 64'(exp_act));
                front[v] = exp_act;
                if (exp_act) begin
                  any = 1; c_act++;
                  r_rad[v] = round;
                  r_vis[v] = r_next[v];
                  creq(nn, OP_RD, A(B, 12, v), 0, 0, t1, r1);
                  creq(nn, OP_WR, A(B + 8, 12, v), r1, 0, t1, r1);
                end
              end
            end
          join_none
        end
        wait fork;
      end
      $display("Radii done after %0d rounds at cycle %0d", round, cyc);
      chk("Radii converged", 64'(any), 0);
      for (int v = 0; v < NV; v++) begin
        creq((v * 3) % N, OP_RD, A(B,     12, v), 0, 0, tc, d);
        chk($sformatf("radii next v%0d", v), d, 64'(r_next[v]));
        creq((v * 3) % N, OP_RD, A(B + 4, 12, v), 0, 0, tc, d);
        chk($sformatf("radii radius v%0d", v), d, 64'(r_rad[v]));
        creq((v * 3) % N, OP_RD, A(B + 8, 12, v), 0, 0, tc, d);
        chk($sformatf("radii visited v%0d", v), d, 64'(r_vis[v]));
      end
    end

    $display("events: cache %0d remote %0d svb_hit %0d atomic %0d block %0d active %0d globals %0d",
             c_cache, c_remote, c_hit, c_atomic, c_block, c_act, c_glob);
    chk("cache path used",      64'(c_cache  > 0), 1);
    chk("remote accesses",      64'(c_remote > 0), 1);
    chk("source buffer hits",   64'(c_hit    > 0), 1);
    chk("atomics",              64'(c_atomic > 0), 1);
    chk("held-back requests",   64'(c_block  > 0), 1);
    chk("dense active bits",    64'(c_act    > 0), 1);
    chk("global register used", 64'(c_glob   > 1), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
