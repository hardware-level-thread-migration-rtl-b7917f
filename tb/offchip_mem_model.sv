// offchip_mem_model: behavioural stand-in for one off-chip memory interface
// and its DRAM, for simulation only.
//
// It accepts memory-request packets (line read: header only; line write:
// header plus one data flit) on 'req' and answers each read with a fill
// packet (header plus the 64-bit line) on 'rep' after LAT cycles. Storage is
// a sparse array of 64-bit lines; a line never written reads as the word
// pattern addr ^ 32'h1357_9BDF, so tests can predict it. Testbenches may
// preload lines by writing 'mem' directly.
module offchip_mem_model
  import em2_pkg::*;
#(
  parameter int unsigned LAT     = 8,
  parameter logic [6:0]  MY_NODE = 7'd0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t req_flit,
  input  logic  req_valid,
  output logic  req_ready,
  output flit_t rep_flit,
  output logic  rep_valid,
  input  logic  rep_ready
);
  logic [63:0] mem [logic [31:0]];
  int unsigned reads, writes;

  function automatic logic [63:0] rd_line(input logic [31:0] a);
    if (mem.exists(a)) return mem[a];
    return {(a + 32'd4) ^ 32'h1357_9BDF, a ^ 32'h1357_9BDF};
  endfunction

  typedef struct { longint unsigned due; flit_t f; } qent_t;
  qent_t q[$];
  longint unsigned cyc;

  logic        in_body;
  logic [63:0] hdr;

  assign req_ready = 1'b1;
  assign rep_valid = (q.size() > 0) && (q[0].due <= cyc);
  assign rep_flit  = (q.size() > 0) ? q[0].f : '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; in_body <= 1'b0; hdr <= '0; reads <= 0; writes <= 0;
      q.delete();
    end else begin
      cyc <= cyc + 1;
      if (rep_valid && rep_ready) void'(q.pop_front());
      if (req_valid) begin
        if (!in_body) begin
          hdr <= req_flit.data;
          if (req_flit.data[63:60] == PK_MRD) begin
            qent_t h, d;
            h.due = cyc + LAT; d.due = cyc + LAT;
            h.f.last = 1'b0;
            h.f.data = {PK_MFILL, req_flit.data[52:46], MY_NODE, req_flit.data[45], 45'd0};
            d.f.last = 1'b1;
            d.f.data = rd_line(req_flit.data[31:0]);
            q.push_back(h); q.push_back(d);
            reads <= reads + 1;
          end
          in_body <= !req_flit.last;
        end else begin
          mem[hdr[31:0]] = req_flit.data;
          writes  <= writes + 1;
          in_body <= 1'b0;
        end
      end
    end
  end
endmodule
