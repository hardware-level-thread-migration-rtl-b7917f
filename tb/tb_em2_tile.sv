// tb_em2_tile: one tile (core 0 at the west end of a two-core row) with the
// testbench standing in for the neighbour on its east side and for off-chip
// memory.
//
// The tile's native thread is fetched through the I$ from memory (memory
// request and reply networks), stores and loads in its own D$ slice, makes
// a remote load from core 1 (the request must leave on the remote-request
// network's east port; the testbench replies on the remote-reply network)
// and migrates to core 1 (the context must leave on the migration network's
// east port with the right stack). Then a thread of core 1 migrates in,
// reads the value the first thread stored and migrates back with the sum.
module tb_em2_tile;
  import em2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit  [NUM_NETS][4], out_flit [NUM_NETS][4];
  logic  in_valid [NUM_NETS][4], in_ready [NUM_NETS][4];
  logic  out_valid[NUM_NETS][4], out_ready[NUM_NETS][4];
  logic  start, halted;
  tile_events_t ev;

  em2_tile #(.NCORES(2), .MESH_W(2), .MC_ROW0(0), .MC_ROW1(0),
             .DC_BYTES(256), .IC_BYTES(256)) dut (
    .clk, .rst_n, .my_core(7'd0), .my_x(4'd0), .my_y(4'd0), .start,
    .boot_pc(32'h0000_1000), .halted,
    .n_in_flit(in_flit), .n_in_valid(in_valid), .n_in_ready(in_ready),
    .n_out_flit(out_flit), .n_out_valid(out_valid), .n_out_ready(out_ready), .ev
  );

  // memory on the east side of the memory networks
  flit_t mrep_flit;
  logic  mrep_valid, mreq_ready;
  offchip_mem_model #(.LAT(4), .MY_NODE(7'd2)) u_mem (
    .clk, .rst_n,
    .req_flit(out_flit[NET_MREQ][1]), .req_valid(out_valid[NET_MREQ][1]), .req_ready(mreq_ready),
    .rep_flit(mrep_flit), .rep_valid(mrep_valid), .rep_ready(in_ready[NET_MREP][1])
  );

  // capture of east-going flits on the core networks
  logic [63:0] cap [NUM_NETS][$];
  always @(negedge clk) if (rst_n)
    for (int n = 0; n < 4; n++)
      if (out_valid[n][1]) cap[n].push_back(out_flit[n][1].data);

  // driven east inputs of the core networks
  flit_t drv_flit [4];
  logic  drv_valid[4];
  always_comb begin
    for (int n = 0; n < NUM_NETS; n++)
      for (int d = 0; d < 4; d++) begin
        in_flit[n][d] = '0; in_valid[n][d] = 1'b0; out_ready[n][d] = 1'b1;
      end
    for (int n = 0; n < 4; n++) begin
      in_flit[n][1]  = drv_flit[n];
      in_valid[n][1] = drv_valid[n];
    end
    in_flit[NET_MREP][1]   = mrep_flit;
    in_valid[NET_MREP][1]  = mrep_valid;
    out_ready[NET_MREQ][1] = mreq_ready;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask
  task automatic wait_cap(int n, int k, string what);
    int t;
    t = 0;
    while (cap[n].size() < k && t < 5000) begin @(posedge clk); t++; end
    checks++;
    if (cap[n].size() < k) begin failures++; $display("FAIL timeout: %s", what); end
  endtask
  task automatic send(int n, logic [63:0] f[$]);
    foreach (f[k]) begin
      @(negedge clk);
      drv_valid[n] = 1; drv_flit[n] = '{last: (k == f.size() - 1), data: f[k]};
      #1;
      while (!in_ready[n][1]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    drv_valid[n] = 0;
  endtask

  function automatic logic [31:0] I(opcode_e op, mig_mode_e m = MM_AUTO, int imm = 0);
    return {op, m, 8'd0, 16'(imm)};
  endfunction

  initial begin
    logic [31:0] p [$];
    logic [63:0] f [$];
    start = 0;
    for (int n = 0; n < 4; n++) begin drv_valid[n] = 0; drv_flit[n] = '0; end
    p = '{I(OP_PUSHI, MM_AUTO, 21), I(OP_PUSHI, MM_AUTO, 16'h40), I(OP_ST),
          I(OP_PUSHI, MM_AUTO, 16'h40), I(OP_LD),                    // 21
          I(OP_LUI, MM_AUTO, 16'h0200), I(OP_LD, MM_REMOTE),           // 21 500
          I(OP_ADD),                                                    // 521
          I(OP_LUI, MM_AUTO, 16'h0200), I(OP_LD, MM_MIGRATE),          // migrate
          // guest code at 0x1028
          I(OP_PUSHI, MM_AUTO, 16'h40), I(OP_LD), I(OP_ADD), I(OP_MIG, MM_AUTO, 1)};
    for (int i = 0; i < p.size(); i += 2)
      u_mem.mem[32'h1000 + 4 * i] = {(i + 1 < p.size()) ? p[i+1] : 32'd0, p[i]};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait_cap(NET_RREQ, 2, "remote request");
    check("rreq header", cap[NET_RREQ][0], {PK_LD, 7'd1, 7'd0, 1'b0, 13'd0, 32'h0200_0000});
    f = '{{PK_RREPLY, 7'd0, 7'd1, 1'b0, 13'd0, 32'd500}};
    send(NET_RREP, f);
    wait_cap(NET_MIG, 3, "migration");
    check("mig header", cap[NET_MIG][0],
          {PK_MIG, 7'd1, 7'd0, 7'd0, 4'd2, 4'd0, 1'b0, 30'((32'h1000 + 4 * 9) >> 2)});
    check("mig stack", cap[NET_MIG][2], {32'h0200_0000, 32'd521});
    cap[NET_MIG].delete();
    // a thread of core 1 visits
    f = '{{PK_MIG, 7'd0, 7'd1, 7'd1, 4'd1, 4'd0, 1'b0, 30'((32'h1000 + 4 * 10) >> 2)},
          64'd0, {32'd0, 32'd1000}};
    send(NET_MIG, f);
    wait_cap(NET_MIG, 3, "guest leaving");
    check("guest header", cap[NET_MIG][0],
          {PK_MIG, 7'd1, 7'd0, 7'd1, 4'd1, 4'd0, 1'b0, 30'((32'h1000 + 4 * 14) >> 2)});
    check("guest stack", cap[NET_MIG][2], {32'd0, 32'd1021});
    checks++;
    if (u_mem.reads == 0) begin failures++; $display("FAIL no memory reads"); end
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
