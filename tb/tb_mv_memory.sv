// Testbench of mv_memory at its default depth: fills every entry through
// port A, reads them back through port B and port A with one cycle latency,
// checks read-old-data on a port A write, and a port B read of an address
// port A writes in the same cycle (old data).
module tb_mv_memory;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = ME_NBLK;
  logic a_en = 0, a_we = 0, b_en = 0;
  logic [ME_AW-1:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;
  logic [31:0] ref_mem [DEPTH];

  mv_memory dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_addr, .b_rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = $urandom;
      a_en = 1; a_we = 1; a_addr = ME_AW'(i); a_wdata = ref_mem[i];
      @(negedge clk);
    end
    a_we = 0; a_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_addr = ME_AW'(DEPTH - 1 - i);
      a_en = 1; a_addr = ME_AW'(i);
      @(negedge clk);
      checks += 2;
      if (b_rdata !== ref_mem[DEPTH-1-i]) failures++;
      if (a_rdata !== ref_mem[i]) failures++;
    end
    // b_en low holds the last value
    b_en = 0; b_addr = 0;
    @(negedge clk);
    checks++;
    if (b_rdata !== ref_mem[0]) failures++;
    // write and read the same address in one cycle: old data on both ports
    a_en = 1; a_we = 1; a_addr = 9'd17; a_wdata = ~ref_mem[17];
    b_en = 1; b_addr = 9'd17;
    @(negedge clk);
    checks += 2;
    if (a_rdata !== ref_mem[17]) failures++;
    if (b_rdata !== ref_mem[17]) failures++;
    a_we = 0;
    @(negedge clk);
    checks += 2;
    if (a_rdata !== ~ref_mem[17]) failures++;
    if (b_rdata !== ~ref_mem[17]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
