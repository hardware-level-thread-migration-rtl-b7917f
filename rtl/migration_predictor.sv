// migration_predictor: learns at which instructions a thread should migrate
// instead of making a remote cache access.
//
// A small direct-mapped table holds "start PCs": program counters of memory
// instructions that began a run of accesses to one remote core. For each of
// the core's thread contexts the predictor watches the stream of D$
// accesses. A run is a sequence of consecutive accesses to the same remote
// home core; it starts at the PC of its first access. When a run reaches
// THRESH accesses, its start PC is entered in the table ('learn'). Later,
// when a memory instruction finds its address remote, a table hit on its PC
// ('lk_hit', combinational) means "migrate". The core reports when a thread
// that migrated on a prediction made fewer than THRESH accesses at its
// destination; the start PC is then removed ('unlearn').
//
// The document gives the function: a learning predictor decides whether to
// migrate on a remote access, and a start PC is removed when too few accesses
// follow the migration. The table size, its direct-mapped organisation, the
// run-length rule and the threshold are this design's choices.
module migration_predictor
  import em2_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned THRESH  = 3,
  parameter int unsigned NCTX    = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // lookup
  input  logic [31:0]              lk_pc,
  output logic                     lk_hit,
  // access stream of one context (one access per cycle at most)
  input  logic                     acc_valid,
  input  logic [$clog2(NCTX)-1:0]  acc_ctx,
  input  logic [31:0]              acc_pc,
  input  logic [CID_W-1:0]         acc_home,
  input  logic                     acc_local,
  // a context left or arrived: forget its run
  input  logic [NCTX-1:0]          ctx_clear,
  // demote a start PC
  input  logic                     unlearn_valid,
  input  logic [31:0]              unlearn_pc,
  output logic                     learn_ev,
  output logic                     unlearn_ev
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = 32 - IW - 2;
  localparam int unsigned CW = $clog2(THRESH + 1);

  logic          vld_q [ENTRIES];
  logic [TW-1:0] tag_q [ENTRIES];

  logic             run_vld_q  [NCTX];
  logic [CID_W-1:0] run_home_q [NCTX];
  logic [31:0]      run_pc_q   [NCTX];
  logic [CW-1:0]    run_cnt_q  [NCTX];

  function automatic logic [IW-1:0] idx(input logic [31:0] pc);
    return pc[IW+1:2];
  endfunction
  function automatic logic [TW-1:0] tag(input logic [31:0] pc);
    return pc[31:IW+2];
  endfunction

  assign lk_hit = vld_q[idx(lk_pc)] && tag_q[idx(lk_pc)] == tag(lk_pc);

  // next run state of the accessing context
  logic          same_run;
  logic [CW-1:0] next_cnt;
  logic          learn;
  always_comb begin
    same_run = run_vld_q[acc_ctx] && run_home_q[acc_ctx] == acc_home;
    next_cnt = same_run ? ((run_cnt_q[acc_ctx] == CW'(THRESH)) ? CW'(THRESH)
                                                               : run_cnt_q[acc_ctx] + 1'b1)
                        : CW'(1);
    learn    = acc_valid && !acc_local && next_cnt == CW'(THRESH)
               && run_cnt_q[acc_ctx] != CW'(THRESH);
  end
  assign learn_ev   = learn;
  assign unlearn_ev = unlearn_valid && vld_q[idx(unlearn_pc)]
                      && tag_q[idx(unlearn_pc)] == tag(unlearn_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        vld_q[e] <= 1'b0; tag_q[e] <= '0;
      end
      for (int c = 0; c < NCTX; c++) begin
        run_vld_q[c] <= 1'b0; run_home_q[c] <= '0;
        run_pc_q[c] <= '0;    run_cnt_q[c] <= '0;
      end
    end else begin
      for (int c = 0; c < NCTX; c++)
        if (ctx_clear[c]) run_vld_q[c] <= 1'b0;
      if (acc_valid && !ctx_clear[acc_ctx]) begin
        if (acc_local) begin
          run_vld_q[acc_ctx] <= 1'b0;
        end else begin
          run_vld_q[acc_ctx]  <= 1'b1;
          run_home_q[acc_ctx] <= acc_home;
          run_cnt_q[acc_ctx]  <= next_cnt;
          if (!same_run) run_pc_q[acc_ctx] <= acc_pc;
        end
      end
      if (unlearn_ev) vld_q[idx(unlearn_pc)] <= 1'b0;
      if (learn) begin
        // the start PC of the run, or this PC if the run starts here
        vld_q[idx(same_run ? run_pc_q[acc_ctx] : acc_pc)] <= 1'b1;
        tag_q[idx(same_run ? run_pc_q[acc_ctx] : acc_pc)] <=
          tag(same_run ? run_pc_q[acc_ctx] : acc_pc);
      end
    end
  end
endmodule
