// tb_dm_cache: random word reads and writes on a small cache (64 bytes,
// eight lines) over an address range four times larger, so lines conflict,
// miss and are written back. A reference array gives every expected read
// value; the testbench's memory answers line reads after a delay and keeps
// write-backs. Also checks that a hit answers two cycles after issue and
// that a read-only instance never writes back.
module tb_dm_cache;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        req_valid, req_ready, req_we, resp_valid;
  logic [31:0] req_addr, req_wdata, resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_fill_valid, miss_ev, wb_ev;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_req_data, mem_fill_data;

  dm_cache #(.SIZE_BYTES(64)) dut (.*);

  logic [31:0] ref_mem [64];    // words of 0x1000..0x10FF
  logic [63:0] dram    [32];    // lines
  int misses = 0, wbs = 0;

  // memory: accepts a request each cycle, fills 5 cycles after a read
  int fill_due = -1, cyc = 0;
  logic [31:0] fill_addr;
  always @(posedge clk) begin
    cyc++;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin dram[(mem_req_addr - 32'h1000) >> 3] = mem_req_data; wbs++; end
      else begin fill_due = cyc + 5; fill_addr = mem_req_addr; end
    end
    if (miss_ev) misses++;
  end
  assign mem_req_ready  = 1'b1;
  assign mem_fill_valid = (fill_due == cyc);
  assign mem_fill_data  = dram[(fill_addr - 32'h1000) >> 3];

  task automatic access(bit we, int w, logic [31:0] d, output int lat);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = 32'h1000 + 4 * w; req_wdata = d;
    lat = 0;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    if (!we) begin
      checks++;
      if (resp_rdata !== ref_mem[w]) begin
        failures++;
        $display("FAIL read word %0d: %h vs %h", w, resp_rdata, ref_mem[w]);
      end
    end else ref_mem[w] = d;
    @(posedge clk);
  endtask

  initial begin
    int lat;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    for (int i = 0; i < 32; i++) begin
      dram[i] = {32'(32'hBEEF0000 + 2 * i + 1), 32'(32'hBEEF0000 + 2 * i)};
      ref_mem[2*i] = 32'hBEEF0000 + 2 * i; ref_mem[2*i+1] = 32'hBEEF0000 + 2 * i + 1;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) access($urandom_range(0, 1), $urandom_range(0, 63), $urandom, lat);
    // hit latency
    access(0, 5, 0, lat);
    access(0, 5, 0, lat);
    checks++;
    if (lat != 1) begin failures++; $display("FAIL hit latency: response %0d cycles after the issue cycle", lat); end
    checks += 2;
    if (misses < 100) begin failures++; $display("FAIL few misses %0d", misses); end
    if (wbs < 50) begin failures++; $display("FAIL few write-backs %0d", wbs); end
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
