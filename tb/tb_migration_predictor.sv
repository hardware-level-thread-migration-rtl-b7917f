// tb_migration_predictor: directed checks of the learning predictor.
//
// A run of THRESH accesses to one remote core from a start PC must enter
// that PC (and only it) in the table; shorter runs, runs broken by a local
// access or by another home, and runs of the other context must not; the
// two contexts keep separate runs; clearing a context forgets its run;
// 'unlearn' removes an entry; a PC that aliases to the same table slot with
// another tag must miss.
module tb_migration_predictor;
  import em2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] lk_pc, acc_pc, unl_pc;
  logic        lk_hit, acc_valid, acc_local, unl_valid, learn_ev, unlearn_ev;
  logic        acc_ctx;
  logic [6:0]  acc_home;
  logic [1:0]  ctx_clear;

  migration_predictor #(.ENTRIES(16), .THRESH(3), .NCTX(2)) dut (
    .clk, .rst_n, .lk_pc, .lk_hit, .acc_valid, .acc_ctx, .acc_pc, .acc_home,
    .acc_local, .ctx_clear, .unlearn_valid(unl_valid), .unlearn_pc(unl_pc),
    .learn_ev, .unlearn_ev
  );

  int learns = 0;
  always @(posedge clk) if (learn_ev) learns++;

  task automatic acc(bit c, logic [31:0] pc, int home, bit local_acc);
    @(negedge clk);
    acc_valid = 1'b1; acc_ctx = c; acc_pc = pc; acc_home = 7'(home); acc_local = local_acc;
    @(negedge clk);
    acc_valid = 1'b0;
  endtask
  task automatic expect_hit(logic [31:0] pc, bit exp, string what);
    @(negedge clk);
    lk_pc = pc;
    #1;
    checks++;
    if (lk_hit !== exp) begin
      failures++;
      $display("FAIL %s: lookup %h hit=%0d expected %0d", what, pc, lk_hit, exp);
    end
  endtask

  initial begin
    acc_valid = 0; acc_ctx = 0; acc_pc = 0; acc_home = 0; acc_local = 0;
    unl_valid = 0; unl_pc = 0; ctx_clear = 0; lk_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // a run of 3 from 0x100 to core 5
    acc(0, 32'h100, 5, 0); acc(0, 32'h104, 5, 0);
    expect_hit(32'h100, 0, "before threshold");
    acc(0, 32'h108, 5, 0);
    expect_hit(32'h100, 1, "start PC learned");
    expect_hit(32'h104, 0, "second PC not learned");
    expect_hit(32'h108, 0, "third PC not learned");
    expect_hit(32'h140, 0, "alias with other tag");
    checks++; if (learns != 1) begin failures++; $display("FAIL learn count %0d", learns); end
    // broken by a local access
    acc(0, 32'h200, 6, 0); acc(0, 32'h204, 6, 0); acc(0, 32'h208, 0, 1); acc(0, 32'h20c, 6, 0);
    expect_hit(32'h200, 0, "run broken by local access");
    // alternating homes
    acc(0, 32'h300, 7, 0); acc(0, 32'h304, 8, 0); acc(0, 32'h308, 7, 0);
    expect_hit(32'h300, 0, "alternating homes");
    // contexts are separate
    acc(0, 32'h400, 9, 0); acc(1, 32'h404, 9, 0); acc(0, 32'h408, 9, 0);
    expect_hit(32'h400, 0, "run spread over contexts");
    acc(1, 32'h408, 9, 0); acc(1, 32'h40c, 9, 0);
    expect_hit(32'h404, 1, "context 1 run learned");
    // clearing a context
    acc(0, 32'h500, 3, 0); acc(0, 32'h504, 3, 0);
    @(negedge clk); ctx_clear = 2'b01; @(negedge clk); ctx_clear = 2'b00;
    acc(0, 32'h508, 3, 0);
    expect_hit(32'h500, 0, "cleared run");
    // unlearn
    @(negedge clk); unl_valid = 1'b1; unl_pc = 32'h100;
    #1 checks++; if (!unlearn_ev) begin failures++; $display("FAIL unlearn event"); end
    @(negedge clk); unl_valid = 1'b0;
    expect_hit(32'h100, 0, "unlearned");
    expect_hit(32'h404, 1, "other entry kept");
    // a long run learns once
    learns = 0;
    for (int i = 0; i < 8; i++) acc(0, 32'h600 + 4 * i, 11, 0);
    checks++; if (learns != 1) begin failures++; $display("FAIL long run learned %0d times", learns); end
    expect_hit(32'h600, 1, "long run start PC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
