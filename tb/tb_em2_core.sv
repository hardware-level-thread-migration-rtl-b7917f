// tb_em2_core: one core (core 1 of a 9-core system) with testbench models of
// its caches and of the networks.
//
// 1. The native thread computes, stores and loads locally, makes a forced
//    remote load (the request packet and, after the reply, the stack are
//    checked) and then migrates on a memory instruction: the context packet
//    (header fields, PC of that instruction, prediction flit, stack flit) is
//    checked field by field.
// 2. A guest context arrives, runs and migrates on to its native core with
//    the expected stack.
// 3. A looping guest is evicted (eviction network, to its native core) when
//    another guest arrives; the newcomer halts, which sends it home.
// 4. The native thread returns, enters the native context, stores the value
//    it brought back (checked in the D$ model) and halts.
module tb_em2_core;
  import em2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, halted;
  logic        i_req_valid, i_req_ready, i_resp_valid;
  logic [31:0] i_addr, i_rdata;
  logic        d_req_valid, d_req_ready, d_ctx, d_resp_valid;
  logic [3:0]  d_type;
  logic [31:0] d_addr, d_wdata, d_rdata;
  flit_t       mig_out_flit, ev_out_flit, mig_in_flit, ev_in_flit, rq_out_flit, rp_in_flit;
  logic        mig_out_valid, mig_out_ready, ev_out_valid, ev_out_ready;
  logic        mig_in_valid, mig_in_ready, ev_in_valid, ev_in_ready;
  logic        rq_out_valid, rq_out_ready, rp_in_valid, rp_in_ready;
  tile_events_t ev;

  em2_core #(.NCORES(9)) dut (.clk, .rst_n, .my_core(7'd1), .boot_pc(32'h100), .*);

  // ---------------------------------------------------------------- program
  logic [31:0] imem [logic [31:0]];
  function automatic void put(logic [31:0] a, opcode_e op, mig_mode_e m = MM_AUTO, int imm = 0);
    imem[a] = {op, m, 8'd0, 16'(imm)};
  endfunction

  // I$ model: one-cycle hit
  logic        i_pend;
  assign i_req_ready = !i_pend;
  always @(posedge clk) begin
    i_resp_valid <= 1'b0;
    if (i_pend) begin
      i_resp_valid <= 1'b1;
      i_rdata      <= imem.exists(i_addr) ? imem[i_addr] : 32'h0;
      i_pend       <= 1'b0;
    end else if (i_req_valid) i_pend <= 1'b1;
  end

  // D$ model
  logic [31:0] dmem [logic [31:0]];
  logic        d_pend;
  assign d_req_ready = !d_pend;
  always @(posedge clk) begin
    d_resp_valid <= 1'b0;
    if (d_pend) d_pend <= 1'b0;
    else if (d_req_valid) begin
      d_pend <= 1'b1;
      d_resp_valid <= 1'b1;
      if (d_type == PK_ST || d_type == PK_STCND) begin
        dmem[d_addr] = d_wdata;
        d_rdata <= 32'd1;
      end else d_rdata <= dmem.exists(d_addr) ? dmem[d_addr] : 32'd0;
    end
  end

  // output capture
  logic [63:0] mig_q[$], ev_q[$], rq_q[$];
  bit          mig_end[$], ev_end[$];
  assign mig_out_ready = 1'b1;
  assign ev_out_ready  = 1'b1;
  assign rq_out_ready  = 1'b1;
  // sampled mid-cycle, where the outputs are settled
  always @(negedge clk) if (rst_n) begin
    if (mig_out_valid) begin mig_q.push_back(mig_out_flit.data); mig_end.push_back(mig_out_flit.last); end
    if (ev_out_valid)  begin ev_q.push_back(ev_out_flit.data);   ev_end.push_back(ev_out_flit.last);  end
    if (rq_out_valid)  rq_q.push_back(rq_out_flit.data);
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  task automatic send_ctx(int native, logic [31:0] pc, logic [31:0] stk[$]);
    logic [63:0] f [$];
    f.push_back({PK_MIG, 7'd1, 7'd8, 7'(native), 4'(stk.size()), 4'd0, 1'b0, pc[31:2]});
    f.push_back(64'd0);
    for (int i = 0; i < stk.size(); i += 2)
      f.push_back({(i + 1 < stk.size()) ? stk[i+1] : 32'd0, stk[i]});
    foreach (f[k]) begin
      @(negedge clk);
      mig_in_valid = 1; mig_in_flit = '{last: (k == f.size() - 1), data: f[k]};
      #1;
      while (!mig_in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    mig_in_valid = 0;
  endtask

  task automatic wait_q(ref logic [63:0] q[$], input int n, input string what);
    int t;
    t = 0;
    while (q.size() < n && t < 2000) begin @(posedge clk); t++; end
    checks++;
    if (q.size() < n) begin failures++; $display("FAIL timeout waiting for %s", what); end
  endtask

  initial begin
    logic [31:0] s [$];
    start = 0; mig_in_valid = 0; mig_in_flit = '0; ev_in_valid = 0; ev_in_flit = '0;
    rp_in_valid = 0; rp_in_flit = '0; i_pend = 0; d_pend = 0;
    // native code at 0x100
    put(32'h100, OP_PUSHI, MM_AUTO, 5);   put(32'h104, OP_PUSHI, MM_AUTO, 7);
    put(32'h108, OP_ADD);                 put(32'h10C, OP_LUI, MM_AUTO, 16'h0200);
    put(32'h110, OP_ORI, MM_AUTO, 16'h100); put(32'h114, OP_ST);      // mem = 12
    put(32'h118, OP_LUI, MM_AUTO, 16'h0200); put(32'h11C, OP_ORI, MM_AUTO, 16'h100);
    put(32'h120, OP_LD);                   // 12
    put(32'h124, OP_LUI, MM_AUTO, 16'h0400); put(32'h128, OP_LD, MM_REMOTE);   // 99
    put(32'h12C, OP_ADD);                  // 111
    put(32'h130, OP_LUI, MM_AUTO, 16'h0600); put(32'h134, OP_LD, MM_MIGRATE);
    // guest code
    put(32'h200, OP_PUSHI, MM_AUTO, 1); put(32'h204, OP_ADD); put(32'h208, OP_MIG, MM_AUTO, 5);
    put(32'h300, OP_BR, MM_AUTO, 0);
    put(32'h400, OP_HALT);
    put(32'h500, OP_LUI, MM_AUTO, 16'h0200); put(32'h504, OP_ORI, MM_AUTO, 16'h104);
    put(32'h508, OP_ST);                   put(32'h50C, OP_HALT);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // ---- 1: remote load
    wait_q(rq_q, 2, "remote request");
    check("rreq header", rq_q[0], {PK_LD, 7'd2, 7'd1, 1'b0, 13'd0, 32'h0400_0000});
    check("local store/load", 64'(dmem[32'h0200_0100]), 64'd12);
    @(negedge clk);
    rp_in_valid = 1; rp_in_flit = '{last: 1'b1, data: {PK_RREPLY, 7'd1, 7'd2, 1'b0, 13'd0, 32'd99}};
    @(negedge clk); rp_in_valid = 0;
    wait_q(mig_q, 3, "migration");
    check("mig header", mig_q[0], {PK_MIG, 7'd3, 7'd1, 7'd1, 4'd2, 4'd0, 1'b0, 30'(32'h134 >> 2)});
    check("mig meta", mig_q[1], {32'd0, 1'b0, 1'b0, 6'd0, 8'd0, 8'd0, 1'b0, 7'd0});
    check("mig stack", mig_q[2], {32'h0600_0000, 32'd111});
    check("mig last", 64'(mig_end[2]), 64'd1);
    check("stack reads", 64'(dmem[32'h0200_0100]), 64'd12);
    mig_q.delete(); mig_end.delete();
    // ---- 2: a guest passes through
    s = '{41};
    send_ctx(5, 32'h200, s);
    wait_q(mig_q, 3, "guest leaving");
    check("guest header", mig_q[0], {PK_MIG, 7'd5, 7'd1, 7'd5, 4'd1, 4'd0, 1'b0, 30'(32'h20C >> 2)});
    check("guest stack", mig_q[2], {32'd0, 32'd42});
    mig_q.delete(); mig_end.delete();
    // ---- 3: eviction
    s = '{1, 2, 3};
    send_ctx(6, 32'h300, s);
    repeat (20) @(posedge clk);
    s = '{};
    send_ctx(7, 32'h400, s);
    wait_q(ev_q, 4, "eviction");
    check("evict header", ev_q[0], {PK_EVICT, 7'd6, 7'd1, 7'd6, 4'd3, 4'd0, 1'b0, 30'(32'h300 >> 2)});
    check("evict stack 0", ev_q[2], {32'd2, 32'd1});
    check("evict stack 1", ev_q[3], {32'd0, 32'd3});
    wait_q(mig_q, 2, "halting guest sent home");
    check("halt-home header", mig_q[0], {PK_MIG, 7'd7, 7'd1, 7'd7, 4'd0, 4'd0, 1'b0, 30'(32'h400 >> 2)});
    mig_q.delete(); mig_end.delete();
    // ---- 4: native thread returns and halts
    checks++; if (halted) begin failures++; $display("FAIL halted early"); end
    s = '{111};
    send_ctx(1, 32'h500, s);
    repeat (30) @(posedge clk);
    checks++; if (!halted) begin failures++; $display("FAIL native thread did not halt"); end
    check("native stack after return", 64'(dmem.exists(32'h0200_0104) ? dmem[32'h0200_0104] : 0), 64'd111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
