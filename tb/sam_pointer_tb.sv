// sam_pointer_tb: checks the SAM pointer against a reference: processor and NTA loads,
// clearing of the tap latch (bits 0:7), and counting in bits 8:19 with the carry from the
// SAM half bit into the row and bank bits, under random operations.
module sam_pointer_tb;
  import frc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic cpu_ld = 0, pe = 0, cl = 0, ce = 0;
  ptr_t cpu_val = 0, pe_val = 0, ptr, ref_p;
  int checks = 0, failures = 0;

  sam_pointer dut (.clk, .rst_n, .cpu_ld, .cpu_val, .pe, .pe_val, .cl, .ce, .ptr);

  task automatic step();
    @(posedge clk);
    if (cpu_ld)  ref_p = cpu_val;
    else if (pe) ref_p = pe_val;
    else begin
      if (cl) ref_p[7:0] = 8'h00;
      if (ce) ref_p[19:8] = ref_p[19:8] + 12'd1;
    end
    #1;
    checks++;
    if (ptr !== ref_p) begin
      failures++;
      $display("FAIL: ptr=%h expected %h", ptr, ref_p);
    end
  endtask

  initial begin
    ref_p = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: tap 0x80 in half 1 of the last row of bank 0 -> next half is bank 1
    cpu_val = 20'h3FF80; cpu_ld = 1; step(); cpu_ld = 0;
    cl = 1; ce = 1; step(); cl = 0; ce = 0;
    checks++; if (ptr != 20'h40000) begin failures++; $display("FAIL: carry into bank %h", ptr); end
    pe_val = 20'h12345; pe = 1; cpu_ld = 1; cpu_val = 20'h00077; step(); pe = 0; cpu_ld = 0;
    checks++; if (ptr != 20'h00077) begin failures++; $display("FAIL: load priority"); end
    ce = 1; step(); ce = 0;
    checks++; if (ptr != 20'h00177) begin failures++; $display("FAIL: increment keeps tap"); end
    repeat (400) begin
      cpu_ld = ($urandom % 16) == 0; cpu_val = $urandom;
      pe = ($urandom % 16) == 0;     pe_val = $urandom;
      cl = $urandom % 2; ce = $urandom % 2;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
