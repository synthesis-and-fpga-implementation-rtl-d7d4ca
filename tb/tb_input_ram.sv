// tb_input_ram: writes random codes to random addresses of a 63-word input
// RAM, keeps a reference copy, and checks every combinational read,
// including the reset contents (+0) and reads past the end.
module tb_input_ram;
  import nadc_pkg::*;
  localparam int unsigned DEPTH = 63;
  localparam int unsigned AW = 6;

  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  sm_t wdata = SM_ZERO, rdata;
  sm_t ref_mem [DEPTH];
  int  checks = 0, failures = 0;

  input_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_read(input int unsigned addr);
    raddr = AW'(addr);
    #1;
    checks++;
    if (rdata !== ((addr < DEPTH) ? ref_mem[addr] : SM_ZERO)) begin
      failures++;
      $display("FAIL read %0d got %b", addr, rdata);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = SM_ZERO;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 64; i++) check_read(i);
    for (int t = 0; t < 500; t++) begin
      int unsigned addr;
      addr = $urandom_range(0, 63);
      we    <= ($urandom_range(0, 3) != 0);
      waddr <= AW'(addr);
      wdata <= sm_t'($urandom);
      @(posedge clk); #1;
      if (we && addr < DEPTH) ref_mem[addr] = wdata;
      check_read($urandom_range(0, 63));
    end
    we <= 0;
    @(posedge clk); #1;
    for (int i = 0; i < 64; i++) check_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
