// tb_weight_rom: a 64-word ROM holding the LSB output neuron's default
// contents (bias -0.5, then +1, -1, +1, ...) is read at every address; the
// expected words are built here from that rule, and addresses past the end
// must read +0.
module tb_weight_rom;
  import nadc_pkg::*;
  localparam int unsigned DEPTH = 64;

  localparam out_layer_w_t W = default_output_weights();

  logic [6:0] raddr = '0;
  sm_t        rdata;
  int         checks = 0, failures = 0;

  weight_rom #(.DEPTH(DEPTH), .AW(7), .CONTENTS(W[0])) dut (.*);

  initial begin
    sm_t expect_v;
    for (int i = 0; i < 128; i++) begin
      raddr = 7'(i);
      #1;
      if (i == 0)          expect_v = 9'b0_0001_0000;        // -0.5
      else if (i < DEPTH)  expect_v = (i % 2 == 1) ? 9'b1_0010_0000 : 9'b0_0010_0000;
      else                 expect_v = 9'b1_0000_0000;
      checks++;
      if (rdata !== expect_v) begin
        failures++;
        $display("FAIL addr %0d got %b expected %b", i, rdata, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
