// local_bus_arbiter_tb: directed checks of the fixed priority (SAMb over SAMa over the
// processor), of BREQ* and of the wait for the processor's BGNT, then random requests
// with four-phase requesters, checking that a grant goes only to a requester, that only one
// grant is high, that a grant is held until released and that a waiting SAMb request is
// never passed over for SAMa.
module local_bus_arbiter_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic sb_breq = 0, sa_breq = 0, sb_bgnt, sa_bgnt, breq_n, bgnt = 0;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  local_bus_arbiter dut (.clk, .rst_n, .sb_breq, .sa_breq, .sb_bgnt, .sa_bgnt, .breq_n, .bgnt);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(breq_n && !sb_bgnt && !sa_bgnt, "idle");
    sa_breq = 1; sb_breq = 1;
    @(negedge clk);
    chk(!breq_n, "BREQ* low when a SAM requests");
    repeat (3) @(negedge clk);
    chk(!sb_bgnt && !sa_bgnt, "no grant without BGNT");
    bgnt = 1;
    @(negedge clk);
    chk(sb_bgnt && !sa_bgnt, "SAMb first");
    repeat (3) @(negedge clk);
    chk(sb_bgnt, "grant held");
    sb_breq = 0;
    @(negedge clk);
    chk(sa_bgnt && !sb_bgnt, "SAMa next");
    sb_breq = 1;       // SAMb asks while SAMa owns: no pre-emption
    @(negedge clk);
    chk(sa_bgnt && !sb_bgnt, "no pre-emption");
    sa_breq = 0;
    @(negedge clk);
    chk(sb_bgnt, "SAMb after SAMa");
    sb_breq = 0;
    @(negedge clk);
    chk(!sb_bgnt && !sa_bgnt && breq_n, "back to processor");
    bgnt = 0;
    // random
    repeat (3000) begin
      @(negedge clk);
      bgnt = !breq_n && ($urandom % 3 != 0);
      if (!sb_breq) sb_breq = ($urandom % 8) == 0; else if (sb_bgnt) sb_breq = ($urandom % 4) != 0;
      if (!sa_breq) sa_breq = ($urandom % 8) == 0; else if (sa_bgnt) sa_breq = ($urandom % 4) != 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // invariants during the random phase
  logic sb_g_d = 0, sa_g_d = 0, sb_r_d = 0, sa_r_d = 0;
  always @(posedge clk) if (rst_n) begin
    chk(!(sb_bgnt && sa_bgnt), "one grant");
    if (sb_bgnt) chk(sb_r_d || sb_breq, "SAMb grant without request");
    if (sa_bgnt) chk(sa_r_d || sa_breq, "SAMa grant without request");
    if (sb_g_d && sb_r_d) chk(sb_bgnt, "SAMb grant dropped while requested");
    if (sa_g_d && sa_r_d) chk(sa_bgnt, "SAMa grant dropped while requested");
    if (sa_bgnt && !sa_g_d && !sb_g_d) chk(!sb_r_d, "SAMa granted over waiting SAMb");
    sb_g_d <= sb_bgnt; sa_g_d <= sa_bgnt; sb_r_d <= sb_breq; sa_r_d <= sa_breq;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
