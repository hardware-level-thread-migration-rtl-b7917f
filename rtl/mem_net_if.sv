// mem_net_if: connects a tile's two caches to the off-chip memory interfaces.
//
// There is one level of cache on the chip, so every I$ or D$ line miss and
// every D$ write-back goes to one of the two off-chip memory interfaces
// over the memory-request network, and line fills come back over the
// memory-reply network. Lines are interleaved over the two interfaces by
// line-address bit 3. The block takes one cache request at a time
// (alternating between the caches when both wait), sends it as a packet and
// acknowledges the cache once the last flit has left. Fills are steered back
// to the cache named in the reply header.
//
// Request: header {PK_MRD or PK_MWR, interface node, this core, [45] 1 = I$,
// [31:0] line address}; a write-back adds one 64-bit data flit.
// Fill: header {PK_MFILL, this core, interface node, [45] cache}, then the
// 64-bit line.
//
// The document names the two off-chip memory interfaces and the single level
// of cache; the interleaving, packet formats and arbitration are this
// design's choices.
module mem_net_if
  import em2_pkg::*;
#(
  parameter int unsigned NCORES = NCORES_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CID_W-1:0] my_core,
  // cache ports (index 0 = D$, 1 = I$)
  input  logic             c_req_valid [2],
  output logic             c_req_ready [2],
  input  logic             c_req_we    [2],
  input  logic [31:0]      c_req_addr  [2],
  input  logic [63:0]      c_req_data  [2],
  output logic             c_fill_valid[2],
  output logic [63:0]      c_fill_data,
  // memory-request network, inject port
  output flit_t            rq_flit,
  output logic             rq_valid,
  input  logic             rq_ready,
  // memory-reply network, eject port
  input  flit_t            rp_flit,
  input  logic             rp_valid,
  output logic             rp_ready
);
  // ------------------------------------------------------------ request side
  logic busy_q, sel_q, phase_q, last_sel_q;
  logic pick;
  always_comb begin
    pick = last_sel_q ? !c_req_valid[0] : c_req_valid[1];   // alternate
    if (!c_req_valid[0] && !c_req_valid[1]) pick = 1'b0;
  end

  logic        cur;
  logic        cur_we;
  logic [31:0] cur_addr;
  assign cur      = busy_q ? sel_q : pick;
  assign cur_we   = c_req_we[cur];
  assign cur_addr = c_req_addr[cur];

  always_comb begin
    rq_flit = '0;
    if (!phase_q) begin
      rq_flit.data[63:60] = cur_we ? PK_MWR : PK_MRD;
      rq_flit.data[59:53] = CID_W'(NCORES) + CID_W'(cur_addr[3]);
      rq_flit.data[52:46] = my_core;
      rq_flit.data[45]    = cur;
      rq_flit.data[31:0]  = cur_addr;
      rq_flit.last        = !cur_we;
    end else begin
      rq_flit.data = c_req_data[cur];
      rq_flit.last = 1'b1;
    end
  end
  assign rq_valid = busy_q || c_req_valid[0] || c_req_valid[1];

  always_comb begin
    c_req_ready[0] = 1'b0;
    c_req_ready[1] = 1'b0;
    if (rq_valid && rq_ready && rq_flit.last) c_req_ready[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0; sel_q <= 1'b0; phase_q <= 1'b0; last_sel_q <= 1'b0;
    end else if (rq_valid && rq_ready) begin
      if (rq_flit.last) begin
        busy_q     <= 1'b0;
        phase_q    <= 1'b0;
        last_sel_q <= cur;
      end else begin
        busy_q  <= 1'b1;
        sel_q   <= cur;
        phase_q <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ reply side
  logic rp_body_q, rp_sel_q;
  assign rp_ready    = 1'b1;
  assign c_fill_data = rp_flit.data;
  always_comb begin
    c_fill_valid[0] = rp_valid && rp_body_q && !rp_sel_q;
    c_fill_valid[1] = rp_valid && rp_body_q &&  rp_sel_q;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_body_q <= 1'b0; rp_sel_q <= 1'b0;
    end else if (rp_valid) begin
      if (!rp_body_q) begin
        rp_body_q <= 1'b1;
        rp_sel_q  <= rp_flit.data[45];
      end else begin
        rp_body_q <= 1'b0;
      end
    end
  end
endmodule
