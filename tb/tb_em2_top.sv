// tb_em2_top: end-to-end test of the multiprocessor on a 3 x 3 mesh.
//
// Three native threads run one program, assembled here. The thread of core
// 0 stores and loads locally, makes forced remote accesses, fills its stack
// deep enough to spill and refill, runs LD_RSV / ST_CND (one success, one
// failure), migrates on a memory instruction, overflows its stack as a
// guest (and so returns home), trains the predictor so that it migrates on
// its own, then makes it forget a start PC that led to a useless migration,
// reloads a line that was written back, and folds its results into one
// number. The threads of cores 4 and 5 both keep migrating to core 7 and
// evict each other from its guest context. The test checks each thread's
// final stack value against values computed here, and that every mechanism
// (migration, eviction, remote access, predictor learn / migrate / unlearn,
// spill, refill, guest return on stack overflow, cache miss, write-back,
// failed ST_CND, halt) happened.
module tb_em2_top;
  import em2_pkg::*;

  localparam int unsigned W = 3, H = 3, N = 9;
  localparam logic [31:0] BOOT = 32'h0000_1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start  [N];
  logic         halted [N];
  tile_events_t events [N];
  flit_t mc_req_flit[2], mc_rep_flit[2];
  logic  mc_req_valid[2], mc_req_ready[2], mc_rep_valid[2], mc_rep_ready[2];

  em2_top #(.MESH_W(W), .MESH_H(H), .MC_ROW0(0), .MC_ROW1(2),
            .DC_BYTES(256), .IC_BYTES(1024)) dut (
    .clk, .rst_n, .start, .boot_pc(BOOT), .halted, .events,
    .mc_req_flit, .mc_req_valid, .mc_req_ready,
    .mc_rep_flit, .mc_rep_valid, .mc_rep_ready
  );

  for (genvar k = 0; k < 2; k++) begin : g_mc
    offchip_mem_model #(.LAT(8), .MY_NODE(7'(N + k))) u_mc (
      .clk, .rst_n,
      .req_flit(mc_req_flit[k]), .req_valid(mc_req_valid[k]), .req_ready(mc_req_ready[k]),
      .rep_flit(mc_rep_flit[k]), .rep_valid(mc_rep_valid[k]), .rep_ready(mc_rep_ready[k])
    );
  end

  // ------------------------------------------------------------ assembler
  logic [31:0] prog [$];
  function automatic logic [31:0] I(opcode_e op, mig_mode_e m, int imm);
    return {op, m, 8'd0, 16'(imm)};
  endfunction
  function automatic void emit(opcode_e op, mig_mode_e m = MM_AUTO, int imm = 0);
    prog.push_back(I(op, m, imm));
  endfunction
  function automatic int here();
    return prog.size();
  endfunction
  // branch at index 'at' to index 'to'
  function automatic void patch(int at, int to);
    prog[at][15:0] = 16'(to - at);
  endfunction

  function automatic logic [31:0] pat(logic [31:0] a);
    return a ^ 32'h1357_9BDF;
  endfunction

  task automatic build();
    int b0, b4, l6, l7, skip7, lb, expect_a;
    // dispatch on core ID: 0 -> A, 4/5 -> B
    emit(OP_COREID); emit(OP_DUP); b0 = here(); emit(OP_BNZ);
    // ---------------- thread A (core 0)
    emit(OP_DROP);
    emit(OP_PUSHI, MM_AUTO, 100); emit(OP_PUSHI, MM_AUTO, 0); emit(OP_ST);
    emit(OP_PUSHI, MM_AUTO, 7); emit(OP_LUI, MM_AUTO, 16'h0200); emit(OP_ST, MM_REMOTE);
    emit(OP_LUI, MM_AUTO, 16'h0200); emit(OP_LD, MM_REMOTE); emit(OP_TOA);
    for (int i = 1; i <= 10; i++) emit(OP_PUSHI, MM_AUTO, i);
    for (int i = 0; i < 9; i++) emit(OP_ADD);
    emit(OP_TOA);
    emit(OP_LUI, MM_AUTO, 16'h0200); emit(OP_ORI, MM_AUTO, 8); emit(OP_LDRSV, MM_REMOTE);
    emit(OP_DROP);
    emit(OP_PUSHI, MM_AUTO, 5); emit(OP_LUI, MM_AUTO, 16'h0200); emit(OP_ORI, MM_AUTO, 8);
    emit(OP_STCND, MM_REMOTE); emit(OP_TOA);
    emit(OP_PUSHI, MM_AUTO, 6); emit(OP_LUI, MM_AUTO, 16'h0200); emit(OP_ORI, MM_AUTO, 8);
    emit(OP_STCND, MM_REMOTE); emit(OP_TOA);
    emit(OP_PUSHI, MM_AUTO, 33); emit(OP_LUI, MM_AUTO, 16'h0400); emit(OP_ST, MM_MIGRATE);
    emit(OP_LUI, MM_AUTO, 16'h0400); emit(OP_LD); emit(OP_TOA);
    emit(OP_COREID); emit(OP_TOA);
    for (int i = 0; i < 9; i++) emit(OP_PUSHI, MM_AUTO, 1);
    for (int i = 0; i < 8; i++) emit(OP_ADD);
    emit(OP_DROP);
    // predictor learns and migrates
    emit(OP_PUSHI, MM_AUTO, 3);
    l6 = here();
    emit(OP_LUI, MM_AUTO, 16'h0600); emit(OP_LD); emit(OP_DROP);
    emit(OP_LUI, MM_AUTO, 16'h0600); emit(OP_ORI, MM_AUTO, 4); emit(OP_LD); emit(OP_DROP);
    emit(OP_LUI, MM_AUTO, 16'h0600); emit(OP_ORI, MM_AUTO, 8); emit(OP_LD); emit(OP_DROP);
    emit(OP_ADDI, MM_AUTO, -1); emit(OP_DUP); emit(OP_BNZ); patch(here() - 1, l6);
    emit(OP_DROP); emit(OP_MIG, MM_AUTO, 0);
    // predictor learns, migrates uselessly, forgets
    emit(OP_PUSHI, MM_AUTO, 2);
    l7 = here();
    emit(OP_LUI, MM_AUTO, 16'h0A00); emit(OP_LD); emit(OP_DROP);
    emit(OP_DUP); emit(OP_ADDI, MM_AUTO, -2); skip7 = here(); emit(OP_BNZ);
    emit(OP_LUI, MM_AUTO, 16'h0A00); emit(OP_LD); emit(OP_DROP);
    emit(OP_LUI, MM_AUTO, 16'h0A00); emit(OP_LD); emit(OP_DROP);
    patch(skip7, here());
    emit(OP_MIG, MM_AUTO, 0);
    emit(OP_ADDI, MM_AUTO, -1); emit(OP_DUP); emit(OP_BNZ); patch(here() - 1, l7);
    emit(OP_DROP);
    // reload the written-back line, fold the results
    emit(OP_PUSHI, MM_AUTO, 0); emit(OP_LD); emit(OP_TOA);
    emit(OP_FROMA);
    for (int i = 0; i < 6; i++) begin
      emit(OP_DUP); emit(OP_ADD); emit(OP_FROMA); emit(OP_ADD);
    end
    emit(OP_HALT);
    // ---------------- threads B (cores 4 and 5)
    patch(b0, here());
    emit(OP_DROP);
    emit(OP_PUSHI, MM_AUTO, 6); emit(OP_TOA); emit(OP_PUSHI, MM_AUTO, 0);
    lb = here();
    emit(OP_LUI, MM_AUTO, 16'h0E00); emit(OP_LD, MM_MIGRATE); emit(OP_ADD);
    emit(OP_NOP); emit(OP_NOP); emit(OP_NOP); emit(OP_NOP);
    emit(OP_FROMA); emit(OP_ADDI, MM_AUTO, -1); emit(OP_DUP); emit(OP_TOA);
    emit(OP_BNZ); patch(here() - 1, lb);
    emit(OP_HALT);
  endtask

  // ------------------------------------------------------------ checks
  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%08h), expected %0d (0x%08h)", what, got, got, exp, exp);
    end
  endtask

  // mechanism counters
  int n_mig = 0, n_evict = 0, n_arrive = 0, n_rreq = 0, n_served = 0;
  int n_pmig = 0, n_learn = 0, n_unlearn = 0, n_spill = 0, n_refill = 0;
  int n_home = 0, n_miss = 0, n_wb = 0, n_cfail = 0, n_halt = 0;
  // sampled mid-cycle, where the event outputs are settled
  always @(negedge clk) if (rst_n) begin
    for (int t = 0; t < N; t++) begin
      n_mig     += int'(events[t].migrate_out);
      n_evict   += int'(events[t].evict_out);
      n_arrive  += int'(events[t].ctx_arrive);
      n_rreq    += int'(events[t].remote_req);
      n_served  += int'(events[t].remote_served);
      n_pmig    += int'(events[t].pred_migrate);
      n_learn   += int'(events[t].pred_learn);
      n_unlearn += int'(events[t].pred_unlearn);
      n_spill   += int'(events[t].spill);
      n_refill  += int'(events[t].refill);
      n_home    += int'(events[t].stack_home);
      n_miss    += int'(events[t].cache_miss);
      n_wb      += int'(events[t].writeback);
      n_cfail   += int'(events[t].stcnd_fail);
      n_halt    += int'(events[t].halt);
    end
  end

  task automatic seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #200_000;
    failures++;
    $display("FAIL watchdog: halted 0=%0d 4=%0d 5=%0d after %0d cycles",
             halted[0], halted[4], halted[5], cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    logic [31:0] aux_exp [7];
    for (int t = 0; t < N; t++) start[t] = 1'b0;
    build();
    for (int i = 0; i < prog.size(); i += 2) begin
      logic [63:0] line;
      line = {(i + 1 < prog.size()) ? prog[i+1] : 32'd0, prog[i]};
      if (((BOOT + 4 * i) & 32'h8) == 0) g_mc[0].u_mc.mem[BOOT + 4 * i] = line;
      else                               g_mc[1].u_mc.mem[BOOT + 4 * i] = line;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start[0] = 1'b1; start[4] = 1'b1; start[5] = 1'b1;
    @(posedge clk);
    start[0] = 1'b0; start[4] = 1'b0; start[5] = 1'b0;
    wait (halted[0] && halted[4] && halted[5]);
    repeat (5) @(posedge clk);
    $display("all threads halted after %0d cycles", cycles);

    // results folded by thread A: aux stack from the bottom
    aux_exp = '{7, 55, 1, 0, 33, 2, 100};
    acc = aux_exp[6];
    for (int i = 5; i >= 0; i--) acc = 2 * acc + int'(aux_exp[i]);
    check("thread A result", dut.g_y[0].g_x[0].u_tile.u_core.s_t0[0][0], 32'(acc));
    check("thread A stack depth", 32'(dut.g_y[0].g_x[0].u_tile.u_core.s_cnt[0][0]), 1);
    check("thread B(4) result", dut.g_y[1].g_x[1].u_tile.u_core.s_t0[0][0],
          6 * pat(32'h0E00_0000));
    check("thread B(5) result", dut.g_y[1].g_x[2].u_tile.u_core.s_t0[0][0],
          6 * pat(32'h0E00_0000));

    seen("migrations", n_mig);
    seen("evictions", n_evict);
    seen("context arrivals", n_arrive);
    seen("remote requests", n_rreq);
    seen("remote requests served", n_served);
    seen("predicted migrations", n_pmig);
    seen("predictor learned", n_learn);
    seen("predictor forgot", n_unlearn);
    seen("stack spills", n_spill);
    seen("stack refills", n_refill);
    seen("guest home on stack limit", n_home);
    seen("cache misses", n_miss);
    seen("write-backs", n_wb);
    seen("failed ST_CND", n_cfail);
    seen("halts", n_halt);
    check("arrivals match departures", n_arrive, n_mig + n_evict);
    check("remote requests all served", n_served, n_rreq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
