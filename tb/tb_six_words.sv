// tb_six_words: a small directed run of the whole controller at its default
// parameters. After reset and memory initialisation it stores the six words
// aaaaaaaa, bbbbbbbb, cccccccc, dddddddd, eeeeeeee and ffffffff at word
// addresses 0h-5h in one 6-beat INCR write burst, reads them back in one
// 6-beat burst, then replaces a single byte of word 2 and reads words 0-7
// again: the new byte, the untouched neighbours and the zeroed words 6-7 are
// checked.
module tb_six_words;
  import zmc_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0, mem_init = 1'b0;
  logic [31:0] awaddr = '0, araddr = '0;
  logic [3:0]  awlen = '0, arlen = '0;
  logic [1:0]  bresp, rresp;
  logic        awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bready = 0, bvalid;
  logic        arvalid = 0, arready, rready = 0, rlast, rvalid;
  word_t       wdata = '0, rdata, status;
  strb_t       wstrb = '0;
  logic        irq, init_ack;
  int          checks = 0, failures = 0;

  zmc_axi4_top dut (
    .zmc_top_clk(clk), .zmc_top_rstn(rstn), .zmc_top_sw_rst(1'b0), .zmc_top_mem_init(mem_init),
    .awaddr(awaddr), .awlen(awlen), .awburst(BURST_INCR), .awvalid(awvalid), .awready(awready),
    .wdata(wdata), .wlast(wlast), .wstrb(wstrb), .wvalid(wvalid), .wready(wready),
    .bready(bready), .bvalid(bvalid), .bresp(bresp),
    .araddr(araddr), .arlen(arlen), .arburst(BURST_INCR), .arvalid(arvalid), .arready(arready),
    .rready(rready), .rdata(rdata), .rlast(rlast), .rresp(rresp), .rvalid(rvalid),
    .i_psel(1'b0), .i_penable(1'b0), .i_pwrite(1'b0), .i_pwdata('0), .i_paddr('0),
    .i_pstrb('0), .i_ECC_STAUS_REG_clear(1'b0), .ECC_interrupt(irq),
    .O_ECC_STATUS_REG(status), .MEM_init_ACK(init_ack));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_burst(input logic [31:0] a, input word_t d [], input strb_t s);
    @(negedge clk); awvalid = 1; awaddr = a; awlen = 4'(d.size() - 1);
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0;
    foreach (d[i]) begin
      wvalid = 1; wdata = d[i]; wstrb = s; wlast = (i == d.size() - 1);
      do @(posedge clk); while (!wready);
      @(negedge clk); wvalid = 0;
    end
    bready = 1;
    do @(posedge clk); while (!bvalid);
    check(bresp == RESP_OKAY, "bresp");
    @(negedge clk); bready = 0;
  endtask

  task automatic read_check(input logic [31:0] a, input word_t exp []);
    @(negedge clk); arvalid = 1; araddr = a; arlen = 4'(exp.size() - 1);
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0; rready = 1;
    foreach (exp[i]) begin
      do @(posedge clk); while (!rvalid);
      check(rdata == exp[i] && rresp == RESP_OKAY && rlast == (i == exp.size() - 1),
            $sformatf("word %0d: got %h exp %h", i, rdata, exp[i]));
    end
    @(negedge clk); rready = 0;
  endtask

  initial begin
    automatic word_t six [] = '{32'haaaaaaaa, 32'hbbbbbbbb, 32'hcccccccc,
                      32'hdddddddd, 32'heeeeeeee, 32'hffffffff};
    automatic word_t one [] = '{32'h0000_5a00};
    automatic word_t all8 [] = '{32'haaaaaaaa, 32'hbbbbbbbb, 32'hcccc5acc, 32'hdddddddd,
                       32'heeeeeeee, 32'hffffffff, 32'h0, 32'h0};
    repeat (3) @(negedge clk);
    rstn = 1;
    @(negedge clk); mem_init = 1;
    do @(posedge clk); while (!init_ack);
    @(negedge clk); mem_init = 0;
    write_burst(32'h0, six, 4'hF);
    read_check(32'h0, six);
    write_burst(32'h9, one, 4'b0010);   // byte 1 of word 2 (address bits [1:0] ignored)
    read_check(32'h0, all8);
    check(status == 0 && !irq, "no ECC events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
