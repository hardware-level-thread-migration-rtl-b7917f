// dm_cache: direct-mapped, write-back, write-allocate cache with 64-bit lines.
//
// Serves the tile's 32 KB data cache slice and its 8 KB instruction cache
// (READ_ONLY). The processor side takes one 32-bit word request at a time
// (req_valid/req_ready) and answers with a one-cycle resp_valid pulse. A
// request is registered when accepted and looked up the next cycle, so the
// resp_valid of a hit rises in the cycle after the request was accepted. On a
// miss a dirty victim line is first written back (mem_req with
// mem_req_we=1), then the line is read (mem_req with mem_req_we=0) and the
// access completes when mem_fill_valid brings the line. Lines are 64 bits, one network flit.
//
// The document gives the sizes (32 KB data, 8 KB instruction) and that the
// data cache is the only level of cache in front of off-chip memory. The
// direct-mapped organisation, the line size and the write policy are this
// design's choices.
module dm_cache #(
  parameter int unsigned SIZE_BYTES = 32768,
  parameter bit          READ_ONLY  = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        resp_valid,
  output logic [31:0] resp_rdata,
  // memory side
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output logic [31:0] mem_req_addr,    // line address (bits 2:0 zero)
  output logic [63:0] mem_req_data,
  input  logic        mem_fill_valid,
  input  logic [63:0] mem_fill_data,
  // statistics
  output logic        miss_ev,
  output logic        wb_ev
);
  localparam int unsigned LINES = SIZE_BYTES / 8;
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned TW    = 32 - IW - 3;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB, S_RD, S_FILL} state_e;
  state_e st_q;

  logic [63:0]   data_q [LINES];
  logic [TW-1:0] tag_q  [LINES];
  logic [LINES-1:0] valid_q, dirty_q;

  logic          we_q;
  logic [31:0]   addr_q, wdata_q;

  logic [IW-1:0] idx;
  logic [TW-1:0] tg;
  logic          hit;
  logic [63:0]   line;
  assign idx  = addr_q[IW+2:3];
  assign tg   = addr_q[31:IW+3];
  assign line = data_q[idx];
  assign hit  = valid_q[idx] && tag_q[idx] == tg;

  assign req_ready  = (st_q == S_IDLE);
  assign resp_valid = (st_q == S_LOOKUP) && hit;
  assign resp_rdata = addr_q[2] ? line[63:32] : line[31:0];

  assign mem_req_valid = (st_q == S_WB) || (st_q == S_RD);
  assign mem_req_we    = (st_q == S_WB);
  assign mem_req_addr  = (st_q == S_WB) ? {tag_q[idx], idx, 3'b000}
                                        : {addr_q[31:3], 3'b000};
  assign mem_req_data  = line;
  assign miss_ev       = (st_q == S_LOOKUP) && !hit;
  assign wb_ev         = (st_q == S_WB) && mem_req_ready;

  // data array: written on a write hit and on a fill
  always_ff @(posedge clk) begin
    if (st_q == S_LOOKUP && hit && we_q && !READ_ONLY) begin
      if (addr_q[2]) data_q[idx][63:32] <= wdata_q;
      else           data_q[idx][31:0]  <= wdata_q;
    end else if (st_q == S_FILL && mem_fill_valid) begin
      data_q[idx] <= mem_fill_data;
      tag_q[idx]  <= tg;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      valid_q <= '0;
      dirty_q <= '0;
      we_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
    end else begin
      case (st_q)
        S_IDLE: if (req_valid) begin
          we_q    <= req_we && !READ_ONLY;
          addr_q  <= req_addr;
          wdata_q <= req_wdata;
          st_q    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            if (we_q) dirty_q[idx] <= 1'b1;
            st_q <= S_IDLE;
          end else if (valid_q[idx] && dirty_q[idx]) begin
            st_q <= S_WB;
          end else begin
            st_q <= S_RD;
          end
        end
        S_WB:   if (mem_req_ready) st_q <= S_RD;
        S_RD:   if (mem_req_ready) st_q <= S_FILL;
        S_FILL: if (mem_fill_valid) begin
          valid_q[idx] <= 1'b1;
          dirty_q[idx] <= 1'b0;
          st_q         <= S_LOOKUP;   // replay the access; it now hits
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
