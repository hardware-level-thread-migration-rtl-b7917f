// tb_em2_top_full: the multiprocessor at its full size (110 cores on a
// 10 x 11 mesh, 32 KB D$ and 8 KB I$ per tile) through one complete
// operation.
//
// The thread of core 0 migrates across the chip to core 106 on a store to
// data homed there, loads it back locally, adds one, migrates home by
// instruction and halts. At the same time the thread of core 57 makes a
// remote load from core 3's slice and halts. Every fetch misses to the two
// off-chip memory models. The test checks both results, that the context
// left and came back, that a remote access was served, and that the two
// threads halted.
module tb_em2_top_full;
  import em2_pkg::*;

  localparam int unsigned N = 110;
  localparam logic [31:0] BOOT = 32'h0000_1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start  [N];
  logic         halted [N];
  tile_events_t events [N];
  flit_t mc_req_flit[2], mc_rep_flit[2];
  logic  mc_req_valid[2], mc_req_ready[2], mc_rep_valid[2], mc_rep_ready[2];

  em2_top dut (
    .clk, .rst_n, .start, .boot_pc(BOOT), .halted, .events,
    .mc_req_flit, .mc_req_valid, .mc_req_ready,
    .mc_rep_flit, .mc_rep_valid, .mc_rep_ready
  );

  for (genvar k = 0; k < 2; k++) begin : g_mc
    offchip_mem_model #(.LAT(20), .MY_NODE(7'(N + k))) u_mc (
      .clk, .rst_n,
      .req_flit(mc_req_flit[k]), .req_valid(mc_req_valid[k]), .req_ready(mc_req_ready[k]),
      .rep_flit(mc_rep_flit[k]), .rep_valid(mc_rep_valid[k]), .rep_ready(mc_rep_ready[k])
    );
  end

  logic [31:0] prog [$];
  function automatic void emit(opcode_e op, mig_mode_e m = MM_AUTO, int imm = 0);
    prog.push_back({op, m, 8'd0, 16'(imm)});
  endfunction

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got 0x%08h, expected 0x%08h", what, got, exp);
    end
  endtask

  int n_mig = 0, n_arrive = 0, n_served = 0, n_halt = 0;
  always @(negedge clk) if (rst_n)
    for (int t = 0; t < N; t++) begin
      n_mig    += int'(events[t].migrate_out);
      n_arrive += int'(events[t].ctx_arrive);
      n_served += int'(events[t].remote_served);
      n_halt   += int'(events[t].halt);
    end

  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    for (int t = 0; t < N; t++) start[t] = 1'b0;
    // dispatch: core 0 -> X, otherwise Y
    emit(OP_COREID); b = prog.size(); emit(OP_BNZ);
    emit(OP_PUSHI, MM_AUTO, 77); emit(OP_LUI, MM_AUTO, 16'hD400); emit(OP_ST, MM_MIGRATE);
    emit(OP_LUI, MM_AUTO, 16'hD400); emit(OP_LD); emit(OP_PUSHI, MM_AUTO, 1); emit(OP_ADD);
    emit(OP_COREID); emit(OP_TOA);
    emit(OP_MIG, MM_AUTO, 0); emit(OP_HALT);
    prog[b][15:0] = 16'(prog.size() - b);
    emit(OP_LUI, MM_AUTO, 16'h0600); emit(OP_LD, MM_REMOTE); emit(OP_HALT);
    for (int i = 0; i < prog.size(); i += 2) begin
      logic [63:0] line;
      line = {(i + 1 < prog.size()) ? prog[i+1] : 32'd0, prog[i]};
      if (((BOOT + 4 * i) & 32'h8) == 0) g_mc[0].u_mc.mem[BOOT + 4 * i] = line;
      else                               g_mc[1].u_mc.mem[BOOT + 4 * i] = line;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start[0] = 1'b1; start[57] = 1'b1;
    @(negedge clk);
    start[0] = 1'b0; start[57] = 1'b0;
    wait (halted[0] && halted[57]);
    repeat (5) @(posedge clk);
    $display("both threads halted after %0d cycles", cycles);
    check("core 0 thread result", dut.g_y[0].g_x[0].u_tile.u_core.s_t0[0][0], 32'd78);
    check("core 0 thread visited core 106", dut.g_y[0].g_x[0].u_tile.u_core.s_t0[0][1], 32'd106);
    check("core 57 remote load", dut.g_y[5].g_x[7].u_tile.u_core.s_t0[0][0],
          32'h0600_0000 ^ 32'h1357_9BDF);
    check("migrations (there and back)", 32'(n_mig), 2);
    check("arrivals", 32'(n_arrive), 2);
    check("remote accesses served", 32'(n_served), 1);
    check("halts", 32'(n_halt), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
