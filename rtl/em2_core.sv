// em2_core: stack-machine core with two hardware thread contexts and
// hardware thread migration.
//
// Each core holds two thread contexts. Context 0 is the native context,
// reserved for the one thread that belongs to this core; context 1 is the
// guest context, for a thread visiting from another core. A thread's state
// is small: a PC, two register stacks (main and auxiliary, hw_stack), the
// number of entries each has spilled, and the predictor bookkeeping below.
// One instruction engine runs both contexts, alternating between those that
// are ready (simultaneous multithreading at instruction granularity).
//
// Memory instructions (LD, ST, LD_RSV, ST_CND) compute their address from
// the stack and look up its home core (home_core_map). A local address is
// served by this tile's D$ slice. For a remote address the core either
// sends a word request to the home slice and lets the context wait for the
// reply (the other context keeps running), or migrates the thread to the
// home core, where the instruction is executed again, now locally. The
// instruction's mode bits choose: always remote, always migrate, or ask the
// migration predictor. MIG migrates to a named core explicitly.
//
// Migration sends the context as one packet on the migration network:
//   flit 0  {type, dst, src, [45:39] native core, [38:35] main entries,
//            [34:31] aux entries, [29:0] PC[31:2]}
//   flit 1  {[63:32] predicted start PC, [31] prediction valid, [30] live,
//            [29:24] accesses since, [23:16] main spilled, [15:8] aux
//            spilled, [6:0] core that predicted}
//   then the register-stack entries, two per flit, main stack first.
// So the smallest context is 128 bits, and only live stack entries move.
// An arriving thread whose native core is this one enters context 0, which
// is always free for it. Any other thread needs context 1; if a guest is
// there, the core evicts that guest to its own native core on the separate
// eviction network first. Because a native context can always take its
// evicted thread, migrations cannot deadlock.
//
// Stacks spill to and refill from a per-thread area of the address range
// every core may cache, located by the native core number, so only the
// native context spills or refills, before its next instruction. A guest
// whose instruction would underflow or overflow a register stack migrates
// home first; a guest that executes HALT also goes home and halts there.
//
// Prediction bookkeeping: a migration chosen by the predictor records the
// start PC and the predicting core in the context; local accesses at the
// destination are then counted. When the thread later arrives back at the
// predicting core having made fewer than THRESH accesses there, the
// predictor of that core forgets the start PC.
//
// The document gives: a custom stack-based core, two stacks spilled and
// refilled through the data cache, two SMT contexts that keep migration
// deadlock free, instruction-granularity migration, partial contexts of at
// least 128 bits, and the three modes of migration (instruction, static
// per memory instruction, automatic by predictor). The instruction set,
// encodings, stack depths, packet layout, the go-home rule for guest stack
// under/overflow and the prediction feedback rule are this design's own.
module em2_core
  import em2_pkg::*;
#(
  parameter int unsigned NCORES      = NCORES_DEF,
  parameter int unsigned STACK_DEPTH = 8,
  parameter int unsigned PRED_ENTRIES = 16,
  parameter int unsigned PRED_THRESH  = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CID_W-1:0] my_core,
  // start of this core's native thread
  input  logic             start,
  input  logic [31:0]      boot_pc,
  output logic             halted,
  // instruction cache
  output logic             i_req_valid,
  input  logic             i_req_ready,
  output logic [31:0]      i_addr,
  input  logic             i_resp_valid,
  input  logic [31:0]      i_rdata,
  // local port of the D$ slice
  output logic             d_req_valid,
  input  logic             d_req_ready,
  output logic [3:0]       d_type,
  output logic             d_ctx,
  output logic [31:0]      d_addr,
  output logic [31:0]      d_wdata,
  input  logic             d_resp_valid,
  input  logic [31:0]      d_rdata,
  // network ports
  output flit_t            mig_out_flit,
  output logic             mig_out_valid,
  input  logic             mig_out_ready,
  output flit_t            ev_out_flit,
  output logic             ev_out_valid,
  input  logic             ev_out_ready,
  input  flit_t            mig_in_flit,
  input  logic             mig_in_valid,
  output logic             mig_in_ready,
  input  flit_t            ev_in_flit,
  input  logic             ev_in_valid,
  output logic             ev_in_ready,
  output flit_t            rq_out_flit,
  output logic             rq_out_valid,
  input  logic             rq_out_ready,
  input  flit_t            rp_in_flit,
  input  logic             rp_in_valid,
  output logic             rp_in_ready,
  output tile_events_t     ev
);
  localparam int unsigned D   = STACK_DEPTH;
  localparam int unsigned CW  = $clog2(D+1);
  localparam int unsigned SPW = 8;

  // =================================================================== stacks
  // index [ctx][stack]: stack 0 = main, 1 = auxiliary
  logic [31:0]    s_t0 [2][2], s_t1 [2][2];
  logic [CW-1:0]  s_cnt[2][2];
  logic           s_spill_req[2][2], s_refill_req[2][2];
  logic [31:0]    s_spill_data[2][2];
  logic [SPW-1:0] s_spilled[2][2];
  logic [31:0]    s_entries[2][2][D];
  logic           s_op_en[2][2];
  logic [1:0]     s_pop[2][2], s_push[2][2];
  logic [31:0]    s_v0[2][2], s_v1[2][2];
  logic           s_spill_ack[2][2], s_refill_ack[2][2];
  logic           s_load_en[2];
  logic [31:0]    ld_entries[2][D];
  logic [CW-1:0]  ld_cnt[2];
  logic [SPW-1:0] ld_spilled[2];

  for (genvar c = 0; c < 2; c++) begin : g_ctx
    for (genvar s = 0; s < 2; s++) begin : g_stk
      hw_stack #(.DEPTH(D), .SPILL_HI(D-2), .REFILL_LO(2), .SW(SPW)) u_stack (
        .clk, .rst_n,
        .op_en(s_op_en[c][s]), .pop_n(s_pop[c][s]), .push_n(s_push[c][s]),
        .push_v0(s_v0[c][s]), .push_v1(s_v1[c][s]),
        .t0(s_t0[c][s]), .t1(s_t1[c][s]), .count(s_cnt[c][s]),
        .spill_req(s_spill_req[c][s]), .spill_data(s_spill_data[c][s]),
        .spill_ack(s_spill_ack[c][s]),
        .refill_req(s_refill_req[c][s]), .refill_ack(s_refill_ack[c][s]),
        .refill_data(d_rdata), .spilled(s_spilled[c][s]),
        .entries(s_entries[c][s]),
        .load_en(s_load_en[c]), .load_entries(ld_entries[s]),
        .load_count(ld_cnt[s]), .load_spilled(ld_spilled[s])
      );
    end
  end

  // =================================================================== context state
  logic             vld_q  [2];   // slot holds a thread
  logic             wait_q [2];   // waiting for a remote reply
  logic [31:0]      pc_q   [2];
  logic [CID_W-1:0] nat_q  [2];
  logic             pv_q   [2];   // an unjudged prediction
  logic             plive_q[2];   // at the predicted destination
  logic [31:0]      ppc_q  [2];
  logic [5:0]       pcnt_q [2];
  logic [CID_W-1:0] psrc_q [2];
  logic [1:0]       wpop_q [2], wpush_q[2];
  logic             halted_q;
  assign halted = halted_q;

  // =================================================================== engine
  typedef enum logic [3:0] {
    E_SEL, E_SPILL, E_SPWAIT, E_FETCH, E_FWAIT, E_EXEC, E_DACC, E_DWAIT,
    E_RQ0, E_RQ1, E_MOUT
  } est_e;
  est_e est_q;

  logic        cur_q, rr_q;
  logic [31:0] ir_q;
  logic        sp_stk_q, sp_refill_q;
  // migration-out
  logic             mo_evict_q;
  logic [CID_W-1:0] mo_dst_q;
  logic [4:0]       mo_k_q;
  logic             mo_pred_q;
  // eviction request from the receive side
  logic             evict_req;

  // ---- decode of the current instruction
  opcode_e   op;
  mig_mode_e mmode;
  logic [31:0] simm, zimm;
  assign op    = opcode_e'(ir_q[31:26]);
  assign mmode = mig_mode_e'(ir_q[25:24]);
  assign simm  = {{16{ir_q[15]}}, ir_q[15:0]};
  assign zimm  = {16'd0, ir_q[15:0]};

  logic [1:0] m_need, m_pop, m_push, a_need, a_pop, a_push;
  logic       is_mem;
  logic [3:0] mem_type;
  always_comb begin
    m_need = 0; m_pop = 0; m_push = 0; a_need = 0; a_pop = 0; a_push = 0;
    is_mem = 1'b0; mem_type = PK_LD;
    case (op)
      OP_PUSHI, OP_LUI, OP_COREID: m_push = 1;
      OP_ORI, OP_ADDI:  begin m_need = 1; m_pop = 1; m_push = 1; end
      OP_ADD, OP_SUB:   begin m_need = 2; m_pop = 2; m_push = 1; end
      OP_DUP:           begin m_need = 1; m_push = 1; end
      OP_DROP, OP_BNZ:  begin m_need = 1; m_pop = 1; end
      OP_SWAP:          begin m_need = 2; m_pop = 2; m_push = 2; end
      OP_OVER:          begin m_need = 2; m_push = 1; end
      OP_TOA:           begin m_need = 1; m_pop = 1; a_push = 1; end
      OP_FROMA:         begin a_need = 1; a_pop = 1; m_push = 1; end
      OP_LD:    begin m_need = 1; m_pop = 1; m_push = 1; is_mem = 1; mem_type = PK_LD;    end
      OP_LDRSV: begin m_need = 1; m_pop = 1; m_push = 1; is_mem = 1; mem_type = PK_LDRSV; end
      OP_ST:    begin m_need = 2; m_pop = 2;             is_mem = 1; mem_type = PK_ST;    end
      OP_STCND: begin m_need = 2; m_pop = 2; m_push = 1; is_mem = 1; mem_type = PK_STCND; end
      default: ;
    endcase
  end

  // stack fit of the current instruction in the current context
  logic fits;
  always_comb begin
    fits = (s_cnt[cur_q][0] >= CW'(m_need)) &&
           (int'(s_cnt[cur_q][0]) - int'(m_pop) + int'(m_push) <= int'(D)) &&
           (s_cnt[cur_q][1] >= CW'(a_need)) &&
           (int'(s_cnt[cur_q][1]) - int'(a_pop) + int'(a_push) <= int'(D));
  end

  // ---- address, home core and the migration decision
  logic [31:0]      maddr, mdata;
  logic [CID_W-1:0] home;
  logic             mlocal;
  logic             pred_hit;
  assign maddr = s_t0[cur_q][0];
  assign mdata = s_t1[cur_q][0];
  home_core_map #(.NCORES(NCORES)) u_home (
    .addr(maddr), .my_core, .home, .replicated(), .is_local(mlocal)
  );

  logic want_mig;
  always_comb begin
    case (mmode)
      MM_MIGRATE: want_mig = 1'b1;
      MM_REMOTE:  want_mig = 1'b0;
      default:    want_mig = pred_hit;
    endcase
  end

  // ---- predictor
  logic       acc_valid;
  logic [1:0] pr_clear;
  logic       unl_valid;
  logic [31:0] unl_pc;
  logic       learn_ev, unlearn_ev;
  migration_predictor #(.ENTRIES(PRED_ENTRIES), .THRESH(PRED_THRESH), .NCTX(2)) u_pred (
    .clk, .rst_n,
    .lk_pc(pc_q[cur_q]), .lk_hit(pred_hit),
    .acc_valid, .acc_ctx(cur_q), .acc_pc(pc_q[cur_q]), .acc_home(home),
    .acc_local(mlocal), .ctx_clear(pr_clear),
    .unlearn_valid(unl_valid), .unlearn_pc(unl_pc),
    .learn_ev, .unlearn_ev
  );
  // one access is recorded per memory instruction that is not migrating
  assign acc_valid = (est_q == E_EXEC) && is_mem && fits && vld_q[cur_q] &&
                     (mlocal || !want_mig);

  // ---- spill area of the native thread
  function automatic logic [31:0] spill_addr(input logic [CID_W-1:0] core,
                                             input logic stk,
                                             input logic [SPW-1:0] n);
    return REPL_BASE + {9'd0, core, 16'd0} + {16'd0, stk, 15'd0}
           + {22'd0, n, 2'b00};
  endfunction

  // ---- engine outputs
  assign i_req_valid = (est_q == E_FETCH);
  assign i_addr      = pc_q[cur_q];

  always_comb begin
    d_req_valid = 1'b0;
    d_type      = PK_LD;
    d_ctx       = cur_q;
    d_addr      = maddr;
    d_wdata     = mdata;
    if (est_q == E_SPILL) begin
      d_req_valid = 1'b1;
      d_type      = sp_refill_q ? PK_LD : PK_ST;
      d_addr      = spill_addr(nat_q[0], sp_stk_q,
                               sp_refill_q ? s_spilled[0][sp_stk_q] - 1'b1
                                           : s_spilled[0][sp_stk_q]);
      d_wdata     = s_spill_data[0][sp_stk_q];
      d_ctx       = 1'b0;
    end else if (est_q == E_DACC) begin
      d_req_valid = 1'b1;
      d_type      = mem_type;
    end
  end

  // remote request packet
  always_comb begin
    rq_out_flit = '0;
    if (est_q == E_RQ0) begin
      rq_out_flit.data[63:60] = mem_type;
      rq_out_flit.data[59:53] = home;
      rq_out_flit.data[52:46] = my_core;
      rq_out_flit.data[45]    = cur_q;
      rq_out_flit.data[31:0]  = maddr;
      rq_out_flit.last        = 1'b0;
    end else begin
      rq_out_flit.data[31:0]  = mdata;
      rq_out_flit.last        = 1'b1;
    end
  end
  assign rq_out_valid = (est_q == E_RQ0) || (est_q == E_RQ1);

  // context packet
  logic [3:0] mo_nm_pairs, mo_na_pairs, mo_last_k;
  flit_t      mo_flit;
  logic [4:0] mo_j;
  always_comb begin
    mo_j        = '0;
    mo_nm_pairs = 4'((int'(s_cnt[cur_q][0]) + 1) / 2);
    mo_na_pairs = 4'((int'(s_cnt[cur_q][1]) + 1) / 2);
    mo_last_k   = 4'd1 + mo_nm_pairs + mo_na_pairs;
    mo_flit     = '0;
    mo_flit.last = (mo_k_q == 5'(mo_last_k));
    if (mo_k_q == 5'd0) begin
      mo_flit.data[63:60] = mo_evict_q ? PK_EVICT : PK_MIG;
      mo_flit.data[59:53] = mo_dst_q;
      mo_flit.data[52:46] = my_core;
      mo_flit.data[45:39] = nat_q[cur_q];
      mo_flit.data[38:35] = 4'(s_cnt[cur_q][0]);
      mo_flit.data[34:31] = 4'(s_cnt[cur_q][1]);
      mo_flit.data[29:0]  = pc_q[cur_q][31:2];
    end else if (mo_k_q == 5'd1) begin
      mo_flit.data[63:32] = ppc_q[cur_q];
      mo_flit.data[31]    = pv_q[cur_q];
      mo_flit.data[30]    = mo_pred_q;
      mo_flit.data[29:24] = pcnt_q[cur_q];
      mo_flit.data[23:16] = s_spilled[cur_q][0];
      mo_flit.data[15:8]  = s_spilled[cur_q][1];
      mo_flit.data[6:0]   = psrc_q[cur_q];
    end else if (mo_k_q < 5'd2 + 5'(mo_nm_pairs)) begin
      mo_j = (mo_k_q - 5'd2) << 1;
      mo_flit.data[31:0]  = s_entries[cur_q][0][mo_j[$clog2(D)-1:0]];
      mo_flit.data[63:32] = (int'(mo_j) + 1 < int'(s_cnt[cur_q][0]))
                            ? s_entries[cur_q][0][mo_j[$clog2(D)-1:0] + 1'b1] : '0;
    end else begin
      mo_j = (mo_k_q - 5'd2 - 5'(mo_nm_pairs)) << 1;
      mo_flit.data[31:0]  = s_entries[cur_q][1][mo_j[$clog2(D)-1:0]];
      mo_flit.data[63:32] = (int'(mo_j) + 1 < int'(s_cnt[cur_q][1]))
                            ? s_entries[cur_q][1][mo_j[$clog2(D)-1:0] + 1'b1] : '0;
    end
  end
  assign mig_out_flit  = mo_flit;
  assign ev_out_flit   = mo_flit;
  assign mig_out_valid = (est_q == E_MOUT) && !mo_evict_q;
  assign ev_out_valid  = (est_q == E_MOUT) &&  mo_evict_q;
  logic mo_fire;
  assign mo_fire = (est_q == E_MOUT) && (mo_evict_q ? ev_out_ready : mig_out_ready);

  // ---- context selection
  logic ready_ctx[2];
  logic sel_ok;
  logic sel_c;
  always_comb begin
    for (int c = 0; c < 2; c++) ready_ctx[c] = vld_q[c] && !wait_q[c];
    // a pending eviction holds the guest context
    if (evict_req) ready_ctx[1] = 1'b0;
    sel_ok = ready_ctx[0] || ready_ctx[1];
    sel_c  = (ready_ctx[0] && ready_ctx[1]) ? !rr_q : ready_ctx[1];
  end
  logic do_evict;
  assign do_evict = (est_q == E_SEL) && evict_req && vld_q[1] && !wait_q[1];

  // =================================================================== receive side
  typedef enum logic [1:0] {R_IDLE, R_BODY} rst_e;
  rst_e  rs_q;
  logic  rsrc_q;                    // 1 = eviction network
  logic  rtgt_q;                    // target context
  logic [63:0] rhdr_q, rmeta_q;
  logic [31:0] rbuf_q [2][D];
  logic [4:0]  rk_q;

  flit_t r_flit;
  logic  r_valid, r_src;
  always_comb begin
    if (rs_q == R_BODY) begin
      r_src = rsrc_q;
    end else begin
      r_src = ev_in_valid;
    end
    r_flit  = r_src ? ev_in_flit  : mig_in_flit;
    r_valid = r_src ? ev_in_valid : mig_in_valid;
  end

  logic hdr_tgt;
  logic hdr_ok;
  always_comb begin
    hdr_tgt = r_src ? 1'b0 : (r_flit.data[45:39] != my_core);
    hdr_ok  = !vld_q[hdr_tgt];
  end
  assign evict_req = (rs_q == R_IDLE) && !r_src && mig_in_valid && hdr_tgt && vld_q[1];

  logic r_take;
  assign r_take       = r_valid && ((rs_q == R_BODY) || hdr_ok);
  assign mig_in_ready = r_take && !r_src;
  assign ev_in_ready  = r_take &&  r_src;

  // body position of flit k (k >= 2): which stack, which entry pair
  logic [3:0] r_nm_pairs;
  assign r_nm_pairs = 4'((int'(rhdr_q[38:35]) + 1) / 2);

  logic r_done;
  assign r_done = r_take && r_flit.last && (rs_q == R_BODY);

  // load the arriving context
  logic [4:0] ld_j;
  logic       ld_s;
  always_comb begin
    ld_j = '0;
    ld_s = 1'b0;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < D; i++) ld_entries[s][i] = rbuf_q[s][i];
    // the final flit is still on the wire in the loading cycle
    if (rk_q >= 5'd2) begin
      ld_s = (rk_q >= 5'd2 + 5'(r_nm_pairs));
      ld_j = ld_s ? (rk_q - 5'd2 - 5'(r_nm_pairs)) << 1 : (rk_q - 5'd2) << 1;
      ld_entries[ld_s][ld_j[$clog2(D)-1:0]] = r_flit.data[31:0];
      if (int'(ld_j) + 1 < int'(D))
        ld_entries[ld_s][ld_j[$clog2(D)-1:0] + 1'b1] = r_flit.data[63:32];
    end
    ld_cnt[0]     = CW'(rhdr_q[38:35]);
    ld_cnt[1]     = CW'(rhdr_q[34:31]);
    ld_spilled[0] = (rk_q == 5'd1) ? r_flit.data[23:16] : rmeta_q[23:16];
    ld_spilled[1] = (rk_q == 5'd1) ? r_flit.data[15:8]  : rmeta_q[15:8];
    s_load_en[0]  = r_done && !rtgt_q;
    s_load_en[1]  = r_done &&  rtgt_q;
  end

  // meta flit as seen in the loading cycle
  logic [63:0] r_meta;
  assign r_meta = (rk_q == 5'd1) ? r_flit.data : rmeta_q;

  // prediction feedback on arrival
  assign unl_valid = r_done && r_meta[31] && r_meta[6:0] == my_core &&
                     int'(r_meta[29:24]) < int'(PRED_THRESH);
  assign unl_pc    = r_meta[63:32];

  // =================================================================== stack control
  // The reply of a remote access updates the waiting context's stack.
  logic       rp_ctx;
  assign rp_ctx      = rp_in_flit.data[45];
  assign rp_in_ready = 1'b1;

  logic exec_op;   // engine applies the current instruction to the stacks
  logic [31:0] ex_v0, ex_v1;
  always_comb begin
    ex_v0 = '0; ex_v1 = '0;
    case (op)
      OP_PUSHI:  ex_v0 = simm;
      OP_LUI:    ex_v0 = {ir_q[15:0], 16'd0};
      OP_ORI:    ex_v0 = s_t0[cur_q][0] | zimm;
      OP_ADDI:   ex_v0 = s_t0[cur_q][0] + simm;
      OP_ADD:    ex_v0 = s_t1[cur_q][0] + s_t0[cur_q][0];
      OP_SUB:    ex_v0 = s_t1[cur_q][0] - s_t0[cur_q][0];
      OP_DUP:    ex_v0 = s_t0[cur_q][0];
      OP_SWAP:   begin ex_v0 = s_t1[cur_q][0]; ex_v1 = s_t0[cur_q][0]; end
      OP_OVER:   ex_v0 = s_t1[cur_q][0];
      OP_TOA:    ex_v0 = s_t0[cur_q][0];
      OP_FROMA:  ex_v0 = s_t0[cur_q][1];
      OP_COREID: ex_v0 = {25'd0, my_core};
      default:   ex_v0 = d_rdata;    // memory results
    endcase
  end

  // in E_EXEC: is the instruction executed right here (not memory, not
  // migration, not halt)?
  logic plain;
  assign plain = !is_mem && op != OP_HALT && op != OP_MIG;
  assign exec_op = (est_q == E_EXEC && vld_q[cur_q] && fits && plain) ||
                   (est_q == E_DWAIT && d_resp_valid);

  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int s = 0; s < 2; s++) begin
        s_op_en[c][s] = 1'b0; s_pop[c][s] = '0; s_push[c][s] = '0;
        s_v0[c][s] = ex_v0; s_v1[c][s] = ex_v1;
        s_spill_ack[c][s] = 1'b0; s_refill_ack[c][s] = 1'b0;
      end
    if (exec_op) begin
      s_op_en[cur_q][0] = 1'b1; s_pop[cur_q][0] = m_pop; s_push[cur_q][0] = m_push;
      s_op_en[cur_q][1] = 1'b1; s_pop[cur_q][1] = a_pop; s_push[cur_q][1] = a_push;
      s_v0[cur_q][1]    = s_t0[cur_q][0];
    end
    if (rp_in_valid) begin
      s_op_en[rp_ctx][0] = 1'b1;
      s_pop[rp_ctx][0]   = wpop_q[rp_ctx];
      s_push[rp_ctx][0]  = wpush_q[rp_ctx];
      s_v0[rp_ctx][0]    = rp_in_flit.data[31:0];
    end
    if (est_q == E_SPWAIT && d_resp_valid) begin
      s_spill_ack[0][sp_stk_q]  = !sp_refill_q;
      s_refill_ack[0][sp_stk_q] =  sp_refill_q;
    end
  end

  // =================================================================== sequencing
  logic mig_now;       // E_EXEC decides to migrate
  logic [CID_W-1:0] mig_dst;
  logic mig_pred, mig_stack;
  always_comb begin
    mig_now = 1'b0; mig_dst = home; mig_pred = 1'b0; mig_stack = 1'b0;
    if (est_q == E_EXEC && vld_q[cur_q]) begin
      if (cur_q && (!fits || op == OP_HALT)) begin
        mig_now = 1'b1; mig_dst = nat_q[1]; mig_stack = !fits;
      end else if (op == OP_MIG && ir_q[CID_W-1:0] != my_core) begin
        mig_now = 1'b1; mig_dst = ir_q[CID_W-1:0];
      end else if (is_mem && !mlocal && want_mig) begin
        mig_now = 1'b1; mig_dst = home;
        mig_pred = (mmode == MM_AUTO);
      end
    end
  end

  always_comb begin
    pr_clear = '0;
    if (s_load_en[0]) pr_clear[0] = 1'b1;
    if (s_load_en[1]) pr_clear[1] = 1'b1;
    if (mo_fire && mo_flit.last) pr_clear[cur_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_q <= E_SEL; cur_q <= 1'b0; rr_q <= 1'b0; ir_q <= '0;
      sp_stk_q <= 1'b0; sp_refill_q <= 1'b0;
      mo_evict_q <= 1'b0; mo_dst_q <= '0; mo_k_q <= '0; mo_pred_q <= 1'b0;
      halted_q <= 1'b0;
      for (int c = 0; c < 2; c++) begin
        vld_q[c] <= 1'b0; wait_q[c] <= 1'b0; pc_q[c] <= '0; nat_q[c] <= '0;
        pv_q[c] <= 1'b0; plive_q[c] <= 1'b0; ppc_q[c] <= '0; pcnt_q[c] <= '0;
        psrc_q[c] <= '0; wpop_q[c] <= '0; wpush_q[c] <= '0;
      end
      rs_q <= R_IDLE; rsrc_q <= 1'b0; rtgt_q <= 1'b0; rhdr_q <= '0; rmeta_q <= '0;
      rk_q <= '0;
      for (int s = 0; s < 2; s++)
        for (int i = 0; i < D; i++) rbuf_q[s][i] <= '0;
    end else begin
      // ------------------------------------------------ native thread start
      if (start && !vld_q[0]) begin
        vld_q[0]  <= 1'b1;
        pc_q[0]   <= boot_pc;
        nat_q[0]  <= my_core;
        halted_q  <= 1'b0;
        pv_q[0]   <= 1'b0;
      end

      // ------------------------------------------------ remote replies
      if (rp_in_valid) begin
        wait_q[rp_ctx] <= 1'b0;
        pc_q[rp_ctx]   <= pc_q[rp_ctx] + 32'd4;
      end

      // ------------------------------------------------ engine
      case (est_q)
        E_SEL: begin
          if (do_evict) begin
            cur_q      <= 1'b1;
            mo_evict_q <= 1'b1;
            mo_dst_q   <= nat_q[1];
            mo_pred_q  <= 1'b0;
            mo_k_q     <= '0;
            est_q      <= E_MOUT;
          end else if (sel_ok) begin
            cur_q <= sel_c;
            rr_q  <= sel_c;
            if (!sel_c && (s_spill_req[0][0] || s_spill_req[0][1] ||
                           s_refill_req[0][0] || s_refill_req[0][1])) begin
              sp_stk_q    <= !(s_spill_req[0][0] || s_refill_req[0][0]);
              sp_refill_q <= (s_spill_req[0][0] || s_refill_req[0][0])
                             ? s_refill_req[0][0] : s_refill_req[0][1];
              est_q       <= E_SPILL;
            end else begin
              est_q <= E_FETCH;
            end
          end
        end
        E_SPILL:  if (d_req_ready) est_q <= E_SPWAIT;
        E_SPWAIT: if (d_resp_valid) est_q <= E_SEL;
        E_FETCH:  if (i_req_ready) est_q <= E_FWAIT;
        E_FWAIT:  if (i_resp_valid) begin
          ir_q  <= i_rdata;
          est_q <= E_EXEC;
        end
        E_EXEC: begin
          if (!vld_q[cur_q]) begin
            est_q <= E_SEL;
          end else if (mig_now) begin
            mo_evict_q <= 1'b0;
            mo_dst_q   <= mig_dst;
            mo_pred_q  <= mig_pred;
            mo_k_q     <= '0;
            if (mig_pred) begin
              pv_q[cur_q]   <= 1'b1;
              ppc_q[cur_q]  <= pc_q[cur_q];
              pcnt_q[cur_q] <= '0;
              psrc_q[cur_q] <= my_core;
            end
            if (op == OP_MIG) pc_q[cur_q] <= pc_q[cur_q] + 32'd4;
            est_q <= E_MOUT;
          end else if (op == OP_HALT) begin
            vld_q[0]  <= 1'b0;
            halted_q  <= 1'b1;
            est_q     <= E_SEL;
          end else if (is_mem && mlocal) begin
            est_q <= E_DACC;
          end else if (is_mem) begin
            wait_q[cur_q]  <= 1'b1;
            wpop_q[cur_q]  <= m_pop;
            wpush_q[cur_q] <= m_push;
            est_q          <= E_RQ0;
          end else begin
            case (op)
              OP_BNZ:  pc_q[cur_q] <= (s_t0[cur_q][0] != 0)
                                      ? pc_q[cur_q] + (simm << 2) : pc_q[cur_q] + 32'd4;
              OP_BR:   pc_q[cur_q] <= pc_q[cur_q] + (simm << 2);
              default: pc_q[cur_q] <= pc_q[cur_q] + 32'd4;
            endcase
            est_q <= E_SEL;
          end
        end
        E_DACC:  if (d_req_ready) est_q <= E_DWAIT;
        E_DWAIT: if (d_resp_valid) begin
          pc_q[cur_q] <= pc_q[cur_q] + 32'd4;
          if (pv_q[cur_q] && plive_q[cur_q] && pcnt_q[cur_q] != 6'h3f)
            pcnt_q[cur_q] <= pcnt_q[cur_q] + 1'b1;
          est_q <= E_SEL;
        end
        E_RQ0: if (rq_out_ready) est_q <= E_RQ1;
        E_RQ1: if (rq_out_ready) est_q <= E_SEL;
        E_MOUT: if (mo_fire) begin
          mo_k_q <= mo_k_q + 1'b1;
          if (mo_flit.last) begin
            vld_q[cur_q] <= 1'b0;
            est_q        <= E_SEL;
          end
        end
        default: est_q <= E_SEL;
      endcase

      // ------------------------------------------------ receive
      case (rs_q)
        R_IDLE: if (r_take) begin
          rsrc_q <= r_src;
          rtgt_q <= hdr_tgt;
          rhdr_q <= r_flit.data;
          rk_q   <= 5'd1;
          rs_q   <= R_BODY;
        end
        R_BODY: if (r_take) begin
          rk_q <= rk_q + 1'b1;
          if (rk_q == 5'd1) rmeta_q <= r_flit.data;
          if (rk_q >= 5'd2) begin
            for (int i = 0; i < D; i++) begin
              rbuf_q[0][i] <= ld_entries[0][i];
              rbuf_q[1][i] <= ld_entries[1][i];
            end
          end
          if (r_flit.last) begin
            rs_q              <= R_IDLE;
            vld_q[rtgt_q]     <= 1'b1;
            wait_q[rtgt_q]    <= 1'b0;
            pc_q[rtgt_q]      <= {rhdr_q[29:0], 2'b00};
            nat_q[rtgt_q]     <= rhdr_q[45:39];
            plive_q[rtgt_q]   <= r_meta[30];
            ppc_q[rtgt_q]     <= r_meta[63:32];
            pcnt_q[rtgt_q]    <= r_meta[29:24];
            psrc_q[rtgt_q]    <= r_meta[6:0];
            pv_q[rtgt_q]      <= r_meta[31] && !unl_valid &&
                                 !(r_meta[6:0] == my_core && !r_meta[30]);
          end
        end
        default: rs_q <= R_IDLE;
      endcase
    end
  end

  // =================================================================== events
  always_comb begin
    ev = '0;
    ev.migrate_out   = mo_fire && mo_flit.last && !mo_evict_q;
    ev.evict_out     = mo_fire && mo_flit.last &&  mo_evict_q;
    ev.ctx_arrive    = r_done;
    ev.remote_req    = (est_q == E_RQ1) && rq_out_ready;
    ev.pred_migrate  = (est_q == E_EXEC) && mig_now && mig_pred;
    ev.pred_learn    = learn_ev;
    ev.pred_unlearn  = unlearn_ev;
    ev.spill         = (est_q == E_SPWAIT) && d_resp_valid && !sp_refill_q;
    ev.refill        = (est_q == E_SPWAIT) && d_resp_valid &&  sp_refill_q;
    ev.stack_home    = (est_q == E_EXEC) && mig_now && mig_stack;
    ev.halt          = (est_q == E_EXEC) && vld_q[cur_q] && !mig_now && op == OP_HALT;
  end

`ifndef SYNTHESIS
  // an evicted thread always finds its native context free
  a_native_free: assert property (@(posedge clk) disable iff (!rst_n)
    (rs_q == R_IDLE && r_take && r_src) |-> !vld_q[0]);
  // a reply only arrives for a waiting context
  a_reply_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    rp_in_valid |-> wait_q[rp_ctx]);
`endif
endmodule
