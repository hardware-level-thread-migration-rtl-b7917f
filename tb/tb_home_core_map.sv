// tb_home_core_map: checks the address-to-home-core mapping at 110 cores and
// at a reduced 9-core size, on corner addresses and random ones, against
// the rule worked out here: top 7 bits name the core (folded modulo the
// core count when no such core exists), and addresses from 0xD600_0000 up
// are cacheable everywhere.
module tb_home_core_map;
  import em2_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] addr;
  logic [6:0]  me;
  logic [6:0]  home_a, home_b;
  logic        rep_a, rep_b, loc_a, loc_b;

  home_core_map #(.NCORES(110)) dut_a (.addr, .my_core(me), .home(home_a),
                                       .replicated(rep_a), .is_local(loc_a));
  home_core_map #(.NCORES(9))   dut_b (.addr, .my_core(me), .home(home_b),
                                       .replicated(rep_b), .is_local(loc_b));

  task automatic one(logic [31:0] a, logic [6:0] m);
    int f, ea, eb;
    bit er;
    addr = a; me = m;
    #1;
    f  = int'(a >> 25);
    ea = (f < 110) ? f : f % 110;
    eb = (f < 9) ? f : f % 9;
    er = (a >= 32'hD600_0000);
    checks += 6;
    if (home_a != 7'(ea)) begin failures++; $display("FAIL home110 %h: %0d vs %0d", a, home_a, ea); end
    if (home_b != 7'(eb)) begin failures++; $display("FAIL home9 %h: %0d vs %0d", a, home_b, eb); end
    if (rep_a != er || rep_b != er) begin failures++; $display("FAIL replicated %h", a); end
    if (loc_a != (er || ea == int'(m))) begin failures++; $display("FAIL local110 %h", a); end
    if (loc_b != (er || eb == int'(m))) begin failures++; $display("FAIL local9 %h", a); end
    if (a == 32'hD5FF_FFFC && rep_a) begin failures++; $display("FAIL boundary"); end
  endtask

  initial begin
    one(32'h0000_0000, 0);
    one(32'h0200_0000, 1);
    one(32'h0200_0000, 0);
    one(32'hD5FF_FFFC, 106);
    one(32'hD600_0000, 3);
    one(32'hFFFF_FFFC, 109);
    one(32'h1200_0010, 9);
    for (int i = 0; i < 2000; i++) one($urandom, 7'($urandom_range(0, 109)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
