`timescale 1ns/1ps
// tb_address_recovery: builds the priority each pixel would have in a given
// period (its count is the first pixel's count minus its position along the
// start-up chain, bit-reversed) and checks that the address stage maps it
// back to the position, one cycle after `prio_valid`, for random positions
// and random counts including wrap-around of the 10-bit counter.
module tb_address_recovery;
  import router_pkg::*;
  localparam int unsigned B = 10;

  logic clk = 1'b0, rst_n = 1'b0, pv = 1'b0, av;
  logic [B-1:0] prio [NUM_CH], addr [NUM_CH], stamp;
  int checks = 0, failures = 0;
  int pos [NUM_CH];
  always #1 clk = ~clk;

  address_recovery #(.PRIO_BITS(B)) dut (.clk, .rst_n, .prio_valid(pv), .prio, .stamp,
    .addr_valid(av), .addr);

  function automatic logic [B-1:0] rev(input logic [B-1:0] v);
    logic [B-1:0] r;
    for (int i = 0; i < B; i++) r[B-1-i] = v[i];
    return r;
  endfunction

  initial begin
    for (int k = 0; k < NUM_CH; k++) prio[k] = '0;
    stamp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      stamp = B'($urandom);
      for (int k = 0; k < NUM_CH; k++) begin
        pos[k] = $urandom % 1024;
        prio[k] = rev(B'(int'(stamp) - pos[k]));
      end
      pv = 1'b1;
      @(negedge clk);
      pv = 1'b0;
      checks++;
      if (!av) begin failures++; $display("FAIL: addr_valid missing"); end
      for (int k = 0; k < NUM_CH; k++) begin
        checks++;
        if (int'(addr[k]) != pos[k]) begin
          failures++;
          $display("FAIL: stamp %0d ch %0d addr %0d exp %0d", stamp, k, addr[k], pos[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (av) begin failures++; $display("FAIL: addr_valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
