// dcache_slice: front end of the tile's 32 KB data cache slice.
//
// Every address has a single home slice (see home_core_map), so a slice is
// accessed both by its own core and, over the remote-request network, by
// threads on other cores that chose a remote access instead of migrating.
// This block serialises the two sources (alternating when both wait), runs
// the word access on the cache (dm_cache) and returns the result: to the
// local core on c_resp_valid, or as a one-flit reply packet on the
// remote-reply network. It also implements the load-reserved /
// store-conditional pair: LD_RSV records a reservation (address, requesting
// core and context); ST_CND stores and returns 1 only if that reservation is
// still held, else it returns 0 and leaves memory alone. Any store to the
// reserved address clears the reservation.
//
// Remote request packet, two flits: header {type, dst, src, [45] context,
// [31:0] address}, then [31:0] store data. Reply, one flit: {PK_RREPLY,
// requester, this core, [45] context, [31:0] data or ST_CND status}.
//
// The four remote operations (LD, ST, LD_RSV, ST_CND), word-sized requests and
// replies, and one slice per core follow the document. The single
// reservation register per slice, the packet layout and the arbitration are
// this design's choices.
module dcache_slice
  import em2_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CID_W-1:0] my_core,
  // local core
  input  logic             c_req_valid,
  output logic             c_req_ready,
  input  logic [3:0]       c_type,     // PK_LD, PK_ST, PK_LDRSV, PK_STCND
  input  logic             c_ctx,
  input  logic [31:0]      c_addr,
  input  logic [31:0]      c_wdata,
  output logic             c_resp_valid,
  output logic [31:0]      c_rdata,
  // remote requests (eject port of the remote-request network)
  input  flit_t            rq_flit,
  input  logic             rq_valid,
  output logic             rq_ready,
  // remote replies (inject port of the remote-reply network)
  output flit_t            rp_flit,
  output logic             rp_valid,
  input  logic             rp_ready,
  // line refills and write-backs
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic             mem_req_we,
  output logic [31:0]      mem_req_addr,
  output logic [63:0]      mem_req_data,
  input  logic             mem_fill_valid,
  input  logic [63:0]      mem_fill_data,
  output logic             served_ev,
  output logic             stcnd_fail_ev,
  output logic             miss_ev,
  output logic             wb_ev
);
  typedef enum logic [2:0] {S_IDLE, S_RDATA, S_ISSUE, S_WAIT, S_LRESP, S_REPLY} state_e;
  state_e st_q;

  logic             remote_q, last_remote_q;
  logic [3:0]       type_q;
  logic [31:0]      addr_q, data_q, result_q;
  logic [CID_W-1:0] who_q;
  logic             ctx_q;

  logic             rsv_vld_q;
  logic [31:0]      rsv_addr_q;
  logic [CID_W-1:0] rsv_core_q;
  logic             rsv_ctx_q;

  logic        cq_valid, cq_ready, cq_we, cr_valid;
  logic [31:0] cr_rdata;

  logic rsv_match;
  assign rsv_match = rsv_vld_q && rsv_addr_q == addr_q && rsv_core_q == who_q
                     && rsv_ctx_q == ctx_q;

  dm_cache #(.SIZE_BYTES(SIZE_BYTES), .READ_ONLY(1'b0)) u_cache (
    .clk, .rst_n,
    .req_valid(cq_valid), .req_ready(cq_ready), .req_we(cq_we),
    .req_addr(addr_q), .req_wdata(data_q),
    .resp_valid(cr_valid), .resp_rdata(cr_rdata),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_data,
    .mem_fill_valid, .mem_fill_data, .miss_ev, .wb_ev
  );

  logic take_remote, take_local;
  always_comb begin
    take_remote = (st_q == S_IDLE) && rq_valid && (!c_req_valid || !last_remote_q);
    take_local  = (st_q == S_IDLE) && c_req_valid && !take_remote;
  end
  assign c_req_ready = take_local;
  assign rq_ready    = take_remote || (st_q == S_RDATA);
  assign cq_valid    = (st_q == S_ISSUE) && !(type_q == PK_STCND && !rsv_match);
  assign cq_we       = (type_q == PK_ST) || (type_q == PK_STCND);

  assign c_resp_valid = (st_q == S_LRESP);
  assign c_rdata      = result_q;

  always_comb begin
    rp_flit.last = 1'b1;
    rp_flit.data = '0;
    rp_flit.data[63:60] = PK_RREPLY;
    rp_flit.data[59:53] = who_q;
    rp_flit.data[52:46] = my_core;
    rp_flit.data[45]    = ctx_q;
    rp_flit.data[31:0]  = result_q;
  end
  assign rp_valid = (st_q == S_REPLY);

  assign served_ev     = (st_q == S_REPLY) && rp_ready;
  assign stcnd_fail_ev = (st_q == S_ISSUE) && type_q == PK_STCND && !rsv_match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      remote_q <= 1'b0; last_remote_q <= 1'b0;
      type_q <= '0; addr_q <= '0; data_q <= '0; result_q <= '0;
      who_q <= '0; ctx_q <= 1'b0;
      rsv_vld_q <= 1'b0; rsv_addr_q <= '0; rsv_core_q <= '0; rsv_ctx_q <= 1'b0;
    end else begin
      case (st_q)
        S_IDLE: begin
          if (take_remote) begin
            remote_q      <= 1'b1;
            last_remote_q <= 1'b1;
            type_q        <= rq_flit.data[63:60];
            who_q         <= rq_flit.data[52:46];
            ctx_q         <= rq_flit.data[45];
            addr_q        <= rq_flit.data[31:0];
            st_q          <= S_RDATA;
          end else if (take_local) begin
            remote_q      <= 1'b0;
            last_remote_q <= 1'b0;
            type_q        <= c_type;
            who_q         <= my_core;
            ctx_q         <= c_ctx;
            addr_q        <= c_addr;
            data_q        <= c_wdata;
            st_q          <= S_ISSUE;
          end
        end
        S_RDATA: if (rq_valid) begin
          data_q <= rq_flit.data[31:0];
          st_q   <= S_ISSUE;
        end
        S_ISSUE: begin
          if (type_q == PK_STCND && !rsv_match) begin
            result_q <= 32'd0;
            st_q     <= remote_q ? S_REPLY : S_LRESP;
          end else if (cq_ready) begin
            st_q <= S_WAIT;
            if (type_q == PK_LDRSV) begin
              rsv_vld_q  <= 1'b1;
              rsv_addr_q <= addr_q;
              rsv_core_q <= who_q;
              rsv_ctx_q  <= ctx_q;
            end else if (cq_we && rsv_addr_q == addr_q) begin
              rsv_vld_q <= 1'b0;
            end
          end
        end
        S_WAIT: if (cr_valid) begin
          result_q <= (type_q == PK_STCND) ? 32'd1 : cr_rdata;
          st_q     <= remote_q ? S_REPLY : S_LRESP;
        end
        S_LRESP: st_q <= S_IDLE;
        S_REPLY: if (rp_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // a remote request is always a header followed by exactly one data flit
  a_rq_two_flits: assert property (@(posedge clk) disable iff (!rst_n)
    (st_q == S_RDATA && rq_valid) |-> rq_flit.last);
`endif
endmodule
