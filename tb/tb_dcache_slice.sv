// tb_dcache_slice: local and remote word accesses on one D$ slice (core 2).
//
// A 64-byte cache in front of a testbench memory makes lines miss and be
// written back. The test checks local store/load, remote loads and stores
// with the reply packet's header (requester, this core, context) and data,
// local and remote requests arriving together, and the LD_RSV / ST_CND
// rules: success with the reservation held, failure after it was used, after
// a plain store to the address, and after another requester reserved.
module tb_dcache_slice;
  import em2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        c_req_valid, c_req_ready, c_ctx, c_resp_valid;
  logic [3:0]  c_type;
  logic [31:0] c_addr, c_wdata, c_rdata;
  flit_t       rq_flit, rp_flit;
  logic        rq_valid, rq_ready, rp_valid, rp_ready;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_fill_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_data, mem_fill_data;
  logic        served_ev, stcnd_fail_ev, miss_ev, wb_ev;

  dcache_slice #(.SIZE_BYTES(64)) dut (.clk, .rst_n, .my_core(7'd2), .*);

  logic [63:0] dram [logic [31:0]];
  int fill_due = -1, cyc = 0, wbs = 0;
  logic [31:0] fill_addr;
  always @(posedge clk) begin
    cyc++;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin dram[mem_req_addr] = mem_req_data; wbs++; end
      else begin fill_due = cyc + 4; fill_addr = mem_req_addr; end
    end
  end
  assign mem_req_ready  = 1'b1;
  assign mem_fill_valid = (fill_due == cyc);
  assign mem_fill_data  = dram.exists(fill_addr) ? dram[fill_addr] : 64'd0;
  assign rp_ready = 1'b1;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  task automatic local_op(pkt_e t, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    c_req_valid = 1; c_type = t; c_addr = a; c_wdata = d; c_ctx = 0;
    #1;
    while (!c_req_ready) @(negedge clk);
    @(negedge clk); c_req_valid = 0;
    while (!c_resp_valid) @(negedge clk);
    r = c_rdata;
  endtask

  task automatic remote_op(pkt_e t, int who, bit ctx, logic [31:0] a, logic [31:0] d,
                           output logic [31:0] r);
    @(negedge clk);
    rq_valid = 1;
    rq_flit  = '{last: 1'b0, data: {t, 7'd2, 7'(who), ctx, 13'd0, a}};
    #1;
    while (!rq_ready) @(negedge clk);
    @(negedge clk);
    rq_flit  = '{last: 1'b1, data: {32'd0, d}};
    #1;
    while (!rq_ready) @(negedge clk);
    @(negedge clk); rq_valid = 0;
    while (!rp_valid) @(negedge clk);
    check("reply type", 32'(rp_flit.data[63:60]), 32'(PK_RREPLY));
    check("reply dst", 32'(rp_flit.data[59:53]), who);
    check("reply src", 32'(rp_flit.data[52:46]), 2);
    check("reply ctx", 32'(rp_flit.data[45]), 32'(ctx));
    checks++; if (!rp_flit.last) begin failures++; $display("FAIL reply not single flit"); end
    r = rp_flit.data[31:0];
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] r;
    int fails_seen;
    c_req_valid = 0; c_type = PK_LD; c_addr = 0; c_wdata = 0; c_ctx = 0;
    rq_valid = 0; rq_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    local_op(PK_ST, 32'h0400_0010, 32'd111, r);
    local_op(PK_LD, 32'h0400_0010, 0, r);       check("local load", r, 111);
    remote_op(PK_ST, 5, 1, 32'h0400_0020, 32'd222, r);
    remote_op(PK_LD, 6, 0, 32'h0400_0020, 0, r); check("remote load", r, 222);
    remote_op(PK_LD, 6, 0, 32'h0400_0010, 0, r); check("remote sees local store", r, 111);
    // conflicting lines: write-back and refetch
    for (int i = 0; i < 16; i++) local_op(PK_ST, 32'h0400_0100 + 8 * i, i, r);
    for (int i = 0; i < 16; i++) begin
      local_op(PK_LD, 32'h0400_0100 + 8 * i, 0, r); check("after write-back", r, i);
    end
    checks++; if (wbs == 0) begin failures++; $display("FAIL no write-backs"); end
    // reservations
    remote_op(PK_LDRSV, 3, 1, 32'h0400_0040, 0, r);
    remote_op(PK_STCND, 3, 1, 32'h0400_0040, 32'd7, r);  check("stcnd success", r, 1);
    remote_op(PK_STCND, 3, 1, 32'h0400_0040, 32'd8, r);  check("stcnd after use", r, 0);
    remote_op(PK_LD, 3, 1, 32'h0400_0040, 0, r);         check("value kept", r, 7);
    remote_op(PK_LDRSV, 3, 0, 32'h0400_0040, 0, r);      check("ldrsv data", r, 7);
    local_op(PK_ST, 32'h0400_0040, 32'd9, r);
    remote_op(PK_STCND, 3, 0, 32'h0400_0040, 32'd10, r); check("stcnd after store", r, 0);
    remote_op(PK_LDRSV, 3, 0, 32'h0400_0040, 0, r);
    remote_op(PK_LDRSV, 4, 0, 32'h0400_0040, 0, r);
    remote_op(PK_STCND, 3, 0, 32'h0400_0040, 32'd11, r); check("stcnd lost reservation", r, 0);
    remote_op(PK_STCND, 4, 0, 32'h0400_0040, 32'd12, r); check("stcnd newer reservation", r, 1);
    local_op(PK_LD, 32'h0400_0040, 0, r);                check("final value", r, 12);
    // local and remote together
    fork
      begin logic [31:0] a; local_op(PK_LD, 32'h0400_0020, 0, a); check("parallel local", a, 222); end
      begin logic [31:0] b; remote_op(PK_LD, 7, 1, 32'h0400_0010, 0, b); check("parallel remote", b, 111); end
    join
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
