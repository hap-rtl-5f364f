// tb_hap_sram: self-checking test of the simple dual-port buffer.
//
// Writes random words to random addresses, keeps a model array, and reads
// them back with a one-cycle latency; also checks that rdata holds while re
// is low and that a same-cycle read of a written address returns the old
// word.
module tb_hap_sram;
  localparam int W = 24, D = 64;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;
  logic we, re;
  logic [5:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  logic [D-1:0] written;

  hap_sram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] last;
    rst_n = 1'b0; we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; written = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = W'($urandom); model[i] = wdata; written[i] = 1;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = W'($urandom);
      re = 1; raddr = (n % 7 == 0) ? waddr : 6'($urandom);
      last = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      check(rdata == last, $sformatf("read %0d", raddr));
      we = 0; re = 0;
      @(negedge clk);
      check(rdata == last, "hold while re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
