// tb_dual_port_ram: self-checking test of the dual-port RAM at its default
// size (16384 x 39 bits).
//
// A reference array in the testbench follows every write. Each cycle a random
// write and a random read (both enabled at random, RAM_en mostly high) are
// issued; the read data is compared one cycle later with the reference value
// from before that cycle's write (old data on a same-address collision), and
// must hold its value when no read is done. Reads are biased towards the
// written addresses. Also checked: RAM_rstn clears the read register, and
// with RAM_en low neither port acts.
module tb_dual_port_ram;
  localparam int AW = 14;
  localparam int DW = 39;

  logic          clk = 1'b0, rstn = 1'b0, en, wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;
  int            checks = 0, failures = 0;

  dual_port_ram dut (
    .RAM_clk(clk), .RAM_rstn(rstn), .RAM_en(en), .RAM_wr_en(wr_en),
    .RAM_wr_addr(wr_addr), .RAM_wr_data(wr_data), .RAM_rd_en(rd_en),
    .RAM_rd_addr(rd_addr), .RAM_rd_data(rd_data));

  always #5 clk = ~clk;

  logic [DW-1:0] ref_mem [1 << AW];
  bit            known   [1 << AW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t rd_data=%h", what, $time, rd_data);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] expect_q;
    bit            expect_known;
    logic [AW-1:0] hot [16];
    en = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    foreach (hot[i]) hot[i] = AW'($urandom);
    @(negedge clk);
    check(rd_data == '0, "reset value");
    rstn = 1'b1;
    // First fill the hot addresses.
    foreach (hot[i]) begin
      en = 1'b1; wr_en = 1'b1; wr_addr = hot[i]; wr_data = DW'({$urandom, $urandom});
      @(posedge clk); ref_mem[wr_addr] = wr_data; known[wr_addr] = 1'b1;
      @(negedge clk);
    end
    expect_q = rd_data; expect_known = 1'b1;
    for (int n = 0; n < 8000; n++) begin
      en      = ($urandom_range(9) != 0);
      wr_en   = 1'($urandom_range(1));
      rd_en   = 1'($urandom_range(1));
      wr_addr = ($urandom_range(3) == 0) ? AW'($urandom) : hot[$urandom_range(15)];
      rd_addr = ($urandom_range(3) == 0) ? wr_addr : hot[$urandom_range(15)];
      wr_data = DW'({$urandom, $urandom});
      @(posedge clk);
      if (en && rd_en) begin
        expect_q     = ref_mem[rd_addr];
        expect_known = known[rd_addr];
      end
      if (en && wr_en) begin
        ref_mem[wr_addr] = wr_data;
        known[wr_addr]   = 1'b1;
      end
      @(negedge clk);
      if (expect_known) check(rd_data == expect_q, "read data");
    end
    // Reset clears the read register.
    rstn = 1'b0; @(negedge clk);
    check(rd_data == '0, "reset clears read data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
