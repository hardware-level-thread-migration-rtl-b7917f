// tb_mesh_router: checks one router at the middle of a 3 x 3 mesh, once
// with X-then-Y and once with Y-then-X routing.
//
// Random packets of one to three flits enter all five inputs, toward every
// core and both memory interface nodes, while the outputs accept flits at
// random. Each flit carries its input, packet number and position, so the
// checker can tell that every packet leaves by the port that dimension-order
// routing gives (worked out here from the coordinates), that its flits stay
// together and in order (wormhole), and that nothing is lost. A separate
// directed phase checks that an uncongested flit crosses in one cycle.
module tb_mesh_router;
  import em2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int unsigned N = 9, W = 3;

  // expected output port, computed from coordinates
  function automatic int exp_port(int dst, bit yx);
    int dx, dy;
    dx = (dst >= N) ? W : dst % W;
    dy = (dst == N) ? 0 : (dst == N + 1) ? 2 : dst / W;
    if (yx) begin
      if (dy > 1) return 3; if (dy < 1) return 1;
      if (dx > 1) return 2; if (dx < 1) return 4;
    end else begin
      if (dx > 1) return 2; if (dx < 1) return 4;
      if (dy > 1) return 3; if (dy < 1) return 1;
    end
    return 0;
  endfunction

  for (genvar v = 0; v < 2; v++) begin : g_v
    flit_t in_flit[5], out_flit[5];
    logic  in_valid[5], in_ready[5], out_valid[5], out_ready[5];

    mesh_router #(.NCORES(N), .MESH_W(W), .MC_ROW0(0), .MC_ROW1(2),
                  .YX_FIRST(v == 1)) dut (
      .clk, .rst_n, .my_x(4'd1), .my_y(4'd1),
      .in_flit, .in_valid, .in_ready, .out_flit, .out_valid, .out_ready
    );

    // generator state per input
    int  pkt_no [5];
    int  pos    [5];
    int  len    [5];
    int  dst    [5];
    bit  gen_on = 1'b0;
    int  sent_flits = 0, recv_flits = 0;
    // receiver state per output
    bit  in_pkt [5];
    int  cur_src[5], cur_pkt[5], cur_pos[5];
    int  last_pkt[5][5];   // [in][out] last packet number seen

    bit directed = 1'b1;
    always @(negedge clk) if (!directed) begin
      for (int i = 0; i < 5; i++) begin
        if (pos[i] > 0 || (gen_on && $urandom_range(0, 3) != 0)) begin
          if (pos[i] == 0) begin
            len[i] = $urandom_range(1, 3);
            dst[i] = $urandom_range(0, N + 1);
          end
          in_valid[i] = 1'b1;
          in_flit[i].last = (pos[i] == len[i] - 1);
          in_flit[i].data = {4'h1, 7'(dst[i]), 7'(i), 14'(pkt_no[i]), 8'(pos[i]), 24'(len[i])};
        end else begin
          in_valid[i] = 1'b0;
          in_flit[i]  = '0;
        end
        out_ready[i] = ($urandom_range(0, 3) != 0);
      end
    end

    always @(posedge clk) if (rst_n) begin
      for (int i = 0; i < 5; i++)
        if (in_valid[i] && in_ready[i]) begin
          sent_flits++;
          if (in_flit[i].last) begin pos[i] = 0; pkt_no[i]++; end
          else pos[i]++;
        end
      for (int o = 0; o < 5; o++)
        if (out_valid[o] && out_ready[o]) begin
          int s, p, q, d;
          recv_flits++;
          d = int'(out_flit[o].data[59:53]);
          s = int'(out_flit[o].data[52:46]);
          p = int'(out_flit[o].data[45:32]);
          q = int'(out_flit[o].data[31:24]);
          checks++;
          if (exp_port(d, v == 1) != o) begin
            failures++;
            $display("FAIL v%0d: dst %0d left by port %0d, expected %0d", v, d, o, exp_port(d, v == 1));
          end
          checks++;
          if (in_pkt[o] ? (s != cur_src[o] || p != cur_pkt[o] || q != cur_pos[o] + 1)
                        : (q != 0 || p <= last_pkt[s][o])) begin
            failures++;
            $display("FAIL v%0d: port %0d flit src %0d pkt %0d pos %0d out of order", v, o, s, p, q);
          end
          cur_src[o] = s; cur_pkt[o] = p; cur_pos[o] = q;
          in_pkt[o]  = !out_flit[o].last;
          if (q == 0) last_pkt[s][o] = p;
        end
    end

    initial begin
      for (int i = 0; i < 5; i++) begin
        pkt_no[i] = 0; pos[i] = 0; len[i] = 1; dst[i] = 0; in_pkt[i] = 1'b0;
        cur_src[i] = 0; cur_pkt[i] = 0; cur_pos[i] = 0;
        in_valid[i] = 1'b0; in_flit[i] = '0; out_ready[i] = 1'b1;
        for (int o = 0; o < 5; o++) last_pkt[i][o] = -1;
      end
    end
  end

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---- directed: one flit west -> east crosses in one cycle
    @(negedge clk);
    g_v[0].in_valid[4] = 1'b1;
    g_v[0].in_flit[4]  = '{last: 1'b1, data: {4'h1, 7'd5, 7'd4, 46'd0}};
    g_v[0].out_ready[2] = 1'b1;
    @(negedge clk);
    g_v[0].in_valid[4] = 1'b0;
    checks++;
    if (!(g_v[0].out_valid[2] && g_v[0].out_flit[2].data[59:53] == 7'd5)) begin
      failures++;
      $display("FAIL single-cycle hop: flit not on the east output one cycle later");
    end
    @(negedge clk);
    checks++;
    if (g_v[0].out_valid[2]) begin
      failures++;
      $display("FAIL flit offered twice");
    end
    g_v[0].recv_flits = 0;
    g_v[0].sent_flits = 0;
    g_v[0].directed = 1'b0;
    g_v[1].directed = 1'b0;
    // ---- random traffic
    g_v[0].gen_on = 1'b1;
    g_v[1].gen_on = 1'b1;
    repeat (4000) @(posedge clk);
    g_v[0].gen_on = 1'b0;
    g_v[1].gen_on = 1'b0;
    // finish open packets
    repeat (50) @(posedge clk);
    for (int v = 0; v < 2; v++) begin
      checks++;
      if ((v == 0 ? g_v[0].sent_flits : g_v[1].sent_flits) !=
          (v == 0 ? g_v[0].recv_flits : g_v[1].recv_flits) ||
          (v == 0 ? g_v[0].recv_flits : g_v[1].recv_flits) < 1000) begin
        failures++;
        $display("FAIL v%0d: sent %0d flits, received %0d", v,
                 v == 0 ? g_v[0].sent_flits : g_v[1].sent_flits,
                 v == 0 ? g_v[0].recv_flits : g_v[1].recv_flits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
