// tb_result_ram: self-checking test of one 16384 x 32 bit result RAM.
// Port A writes the lower half and port B the upper half in the same
// clocks, with random data, then port B reads all words back in random
// order.  Checks every read against a reference array, the one-clock read
// latency, and that the read data holds while no read is issued.
module tb_result_ram;
  localparam int D = 16384, W = 32, AW = $clog2(D);
  logic clk = 0;
  logic a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, b_rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_ram #(.DEPTH(D), .W(W)) dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill: both ports write in the same clock
    for (int i = 0; i < D / 2; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i);         a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'(i + D / 2); b_wdata = $urandom;
      ref_mem[i] = a_wdata;
      ref_mem[i + D / 2] = b_wdata;
    end
    @(negedge clk);
    a_we = 0; b_we = 0; b_en = 0;
    // overwrite a few words through port B, and some through port A
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = AW'($urandom_range(0, D - 1)); b_wdata = $urandom;
      ref_mem[b_addr] = b_wdata;
    end
    @(negedge clk);
    b_en = 0; b_we = 0;
    // random reads
    for (int i = 0; i < 3 * D; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range(0, D - 1));
      @(negedge clk);
      b_en = 1; b_we = 0; b_addr = a;
      @(negedge clk);
      b_en = 0;
      check(b_rdata == ref_mem[a], $sformatf("addr %0d read %h expected %h", a, b_rdata, ref_mem[a]));
      @(negedge clk);
      check(b_rdata == ref_mem[a], "read data holds without a read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
