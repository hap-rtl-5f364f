// tb_hap_addr_gen: self-checking test of the precision loader / address
// generator.
//
// A behavioural precision buffer (one-cycle read, output held while not
// read) holds random 3-bit codes. The generator is started with random base
// addresses and count; out_ready is random. Every taken entry must carry
// precision code + 1, weight address wgt_base + j and activation address
// act_base + (sum of the precisions before it). With out_ready held high the
// entries must stream at one per cycle, the first two cycles after start.
module tb_hap_addr_gen;
  localparam int AW = 12, PAW = 10;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic            start;
  logic [PAW-1:0]  prec_base;
  logic [AW-1:0]   wgt_base, act_base;
  logic [PAW:0]    count;
  logic            pb_re;
  logic [PAW-1:0]  pb_addr;
  logic [2:0]      pb_rdata;
  logic            out_valid, out_ready, done;
  logic [3:0]      out_prec;
  logic [AW-1:0]   out_waddr, out_aaddr;

  hap_addr_gen #(.B(8), .AW(AW), .PAW(PAW)) dut (.*);

  logic [2:0] pmem [1 << PAW];
  always_ff @(posedge clk) if (pb_re) pb_rdata <= pmem[pb_addr];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int taken, expa, cyc0, firstc, lastc, c;
    rst_n = 0; start = 0; prec_base = 0; wgt_base = 0; act_base = 0; count = 0; out_ready = 0;
    pb_rdata = 0;
    for (int i = 0; i < (1 << PAW); i++) pmem[i] = 3'($urandom);
    @(negedge clk); @(negedge clk); rst_n = 1;
    check(done, "idle after reset");
    for (int rep = 0; rep < 20; rep++) begin
      bit always_ready;
      always_ready = (rep % 4 == 0);
      @(negedge clk);
      start = 1; prec_base = PAW'($urandom_range(0, 900)); wgt_base = AW'($urandom);
      act_base = AW'($urandom); count = (PAW+1)'($urandom_range(1, 60));
      @(negedge clk);
      start = 0;
      taken = 0; expa = act_base; c = 0; firstc = -1; lastc = -1;
      while (taken < count && c < 1000) begin
        out_ready = always_ready ? 1'b1 : 1'($urandom);
        #1;
        if (out_valid && out_ready) begin
          check(out_prec == 4'(pmem[prec_base + taken]) + 1, "precision");
          check(out_waddr == AW'(wgt_base + taken), "weight address");
          check(out_aaddr == AW'(expa), "activation address");
          expa += out_prec;
          if (firstc < 0) firstc = c;
          lastc = c;
          taken++;
        end
        @(negedge clk);
        c++;
      end
      out_ready = 0;
      check(taken == count, "all entries");
      #1 check(done, "done after last entry");
      if (always_ready) begin
        check(firstc == 1, $sformatf("first entry latency %0d", firstc));
        check(lastc - firstc == count - 1, "one entry per cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
