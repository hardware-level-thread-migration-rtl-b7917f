// tb_hw_stack: random push/pop traffic against a reference stack.
//
// The testbench keeps the whole logical stack (the part in memory and the
// part in registers) in a queue and services spill and refill requests as
// the core would, from its own memory array. After every cycle it compares
// the top two entries, the register count and the spilled count with the
// model, and checks the watermark rules. It also loads a whole context and
// checks what comes back out.
module tb_hw_stack;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8;
  logic        op_en, spill_req, spill_ack, refill_req, refill_ack, load_en;
  logic [1:0]  pop_n, push_n;
  logic [31:0] push_v0, push_v1, t0, t1, spill_data, refill_data;
  logic [3:0]  count, load_count;
  logic [7:0]  spilled, load_spilled;
  logic [31:0] entries [D], load_entries [D];

  hw_stack #(.DEPTH(D), .SPILL_HI(6), .REFILL_LO(2), .SW(8)) dut (.*);

  logic [31:0] model [$];      // index 0 = deepest
  logic [31:0] memv  [256];
  int          nreg;           // entries the model expects in registers
  int          spills = 0, refills = 0;

  task automatic compare(string when);
    checks += 4;
    if (int'(count) != nreg) begin failures++; $display("FAIL %s: count %0d vs %0d", when, count, nreg); end
    if (int'(spilled) != model.size() - nreg) begin failures++; $display("FAIL %s: spilled %0d", when, spilled); end
    if (nreg >= 1 && t0 !== model[model.size()-1]) begin failures++; $display("FAIL %s: t0 %h vs %h", when, t0, model[model.size()-1]); end
    if (nreg >= 2 && t1 !== model[model.size()-2]) begin failures++; $display("FAIL %s: t1", when); end
  endtask

  initial begin
    op_en = 0; spill_ack = 0; refill_ack = 0; load_en = 0; pop_n = 0; push_n = 0;
    push_v0 = 0; push_v1 = 0; refill_data = 0; load_count = 0; load_spilled = 0;
    for (int i = 0; i < D; i++) load_entries[i] = 0;
    nreg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 5000; step++) begin
      @(negedge clk);
      op_en = 0; spill_ack = 0; refill_ack = 0;
      if (spill_req) begin
        checks++;
        if (nreg <= 6) begin failures++; $display("FAIL spill_req with %0d entries", nreg); end
        memv[model.size() - nreg] = spill_data;
        checks++;
        if (spill_data !== model[model.size() - nreg]) begin failures++; $display("FAIL spill data"); end
        spill_ack = 1; nreg--; spills++;
      end else if (refill_req) begin
        refill_data = memv[model.size() - nreg - 1];
        refill_ack = 1; nreg++; refills++;
      end else begin
        int p, q;
        p = $urandom_range(0, (nreg < 2) ? nreg : 2);
        q = $urandom_range(0, 2);
        if (model.size() > 40) q = 0;
        if (nreg - p + q > D) q = D - (nreg - p);
        op_en = 1; pop_n = 2'(p); push_n = 2'(q);
        push_v0 = $urandom; push_v1 = $urandom;
        for (int k = 0; k < p; k++) void'(model.pop_back());
        if (q == 2) model.push_back(push_v1);
        if (q >= 1) model.push_back(push_v0);
        nreg = nreg - p + q;
      end
      @(posedge clk); #1;
      compare("random");
    end
    checks++;
    if (spills < 50 || refills < 50) begin failures++; $display("FAIL few spills %0d refills %0d", spills, refills); end
    // whole-context load
    @(negedge clk);
    op_en = 0; spill_ack = 0; refill_ack = 0;
    for (int i = 0; i < D; i++) load_entries[i] = 32'hA000 + i;
    load_en = 1; load_count = 4'd5; load_spilled = 8'd3;
    @(negedge clk); load_en = 0;
    checks += 3;
    if (count != 5 || spilled != 3) begin failures++; $display("FAIL load count"); end
    if (t0 != 32'hA004 || t1 != 32'hA003) begin failures++; $display("FAIL load top"); end
    if (entries[0] != 32'hA000) begin failures++; $display("FAIL entries out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
