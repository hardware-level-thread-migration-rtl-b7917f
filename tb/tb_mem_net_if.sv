// tb_mem_net_if: both caches issue random line reads and write-backs while
// the network side accepts flits at random. Every request must leave as
// exactly one packet with the right type, memory interface node (line
// address bit 3), source core, cache flag, address and, for a write-back,
// data; each cache must see one acknowledge per request. Fill packets sent
// back must reach the cache named in their header with their data.
module tb_mem_net_if;
  import em2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        c_req_valid[2], c_req_ready[2], c_req_we[2], c_fill_valid[2];
  logic [31:0] c_req_addr[2];
  logic [63:0] c_req_data[2], c_fill_data;
  flit_t       rq_flit, rp_flit;
  logic        rq_valid, rq_ready, rp_valid, rp_ready;

  mem_net_if #(.NCORES(110)) dut (.clk, .rst_n, .my_core(7'd42), .*);

  typedef struct { bit we; logic [31:0] a; logic [63:0] d; } req_t;
  req_t exp_q[2][$];
  int acks[2], issued[2];
  bit   in_wr;
  req_t cur;
  int   cur_c;

  // cache models: hold a request until acknowledged
  for (genvar c = 0; c < 2; c++) begin : g_c
    always @(negedge clk) if (rst_n) begin
      if (!c_req_valid[c] && issued[c] < 300 && $urandom_range(0, 2) == 0) begin
        c_req_valid[c] = 1;
        c_req_we[c]    = (c == 0) && $urandom_range(0, 1);
        c_req_addr[c]  = {$urandom, 3'b000};
        c_req_data[c]  = {$urandom, $urandom};
        exp_q[c].push_back('{c_req_we[c], c_req_addr[c], c_req_data[c]});
        issued[c]++;
      end
    end
    always @(posedge clk) if (rst_n && c_req_valid[c] && c_req_ready[c]) begin
      acks[c]++;
      #1 c_req_valid[c] = 0;
    end
  end

  always @(negedge clk) rq_ready = $urandom_range(0, 1);

  always @(posedge clk) if (rst_n && rq_valid && rq_ready) begin
    if (!in_wr) begin
      int c;
      c = int'(rq_flit.data[45]);
      checks++;
      if (exp_q[c].size() == 0) begin failures++; $display("FAIL unexpected packet"); end
      else begin
        cur = exp_q[c].pop_front(); cur_c = c;
        checks += 5;
        if (rq_flit.data[63:60] != (cur.we ? PK_MWR : PK_MRD)) begin failures++; $display("FAIL type"); end
        if (rq_flit.data[59:53] != 7'(110 + int'(cur.a[3]))) begin failures++; $display("FAIL mc node"); end
        if (rq_flit.data[52:46] != 7'd42) begin failures++; $display("FAIL src"); end
        if (rq_flit.data[31:0] != cur.a) begin failures++; $display("FAIL addr"); end
        if (rq_flit.last == cur.we) begin failures++; $display("FAIL last on header"); end
        in_wr = cur.we;
      end
    end else begin
      checks += 2;
      if (rq_flit.data != cur.d) begin failures++; $display("FAIL write data"); end
      if (!rq_flit.last) begin failures++; $display("FAIL data flit not last"); end
      in_wr = 0;
    end
  end

  int fills_ok[2];
  initial begin
    in_wr = 0; fills_ok = '{0, 0}; acks = '{0, 0}; issued = '{0, 0};
    for (int c = 0; c < 2; c++) begin
      c_req_valid[c] = 0; c_req_we[c] = 0; c_req_addr[c] = 0; c_req_data[c] = 0;
    end
    rp_valid = 0; rp_flit = '0; rq_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // fills
    for (int k = 0; k < 20; k++) begin
      logic [63:0] d;
      bit c;
      c = k[0] ^ k[2];
      d = {$urandom, $urandom};
      @(negedge clk);
      rp_valid = 1; rp_flit = '{last: 1'b0, data: {PK_MFILL, 7'd42, 7'd110, c, 45'd0}};
      @(negedge clk);
      rp_flit = '{last: 1'b1, data: d};
      #1;
      checks += 2;
      if (!c_fill_valid[c] || c_fill_valid[!c]) begin failures++; $display("FAIL fill steering"); end
      if (c_fill_data != d) begin failures++; $display("FAIL fill data"); end
      @(negedge clk);
      rp_valid = 0;
      #1;
      checks++;
      if (c_fill_valid[0] || c_fill_valid[1]) begin failures++; $display("FAIL fill after end"); end
    end
    wait (issued[0] == 300 && issued[1] == 300 && !c_req_valid[0] && !c_req_valid[1]);
    repeat (5) @(posedge clk);
    checks += 2;
    if (acks[0] != 300 || acks[1] != 300) begin failures++; $display("FAIL acks %0d %0d", acks[0], acks[1]); end
    if (exp_q[0].size() != 0 || exp_q[1].size() != 0) begin failures++; $display("FAIL packets missing"); end
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
