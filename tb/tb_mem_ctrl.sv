// tb_mem_ctrl: self-checking test of the memory controller together with the
// dual-port RAM, at the default size (16384 words).
//
// The testbench plays the AXI slave's role on the request/done handshake and
// keeps its own model of the memory's 32-bit contents. It checks:
//  - initialisation: MEM_init_ACK rises exactly 2**14 + 2 clock edges after the
//    rising edge of MEM_ctrl_mem_init, and every word then reads as zero;
//  - random full-word writes, byte writes (read-modify-write) and reads
//    against the model, with the done pulse after 2, 3 and 3 clock edges;
//  - out-of-range addresses answer SLVERR after 1 edge and leave memory alone;
//  - error injection: a 1-bit mask gives a corrected read (OKAY, status CE
//    bit, count, address, interrupt), a 2-bit mask an uncorrectable read
//    (SLVERR, UE bit); a byte write onto an uncorrectable word is refused;
//  - ECC disabled: the corrupted bits come through unchanged, no flags;
//  - simultaneous read and write requests are both served, in turn;
//  - status clear and software reset.
module tb_mem_ctrl;
  import zmc_pkg::*;

  localparam int AW = 14;

  logic        clk = 1'b0, rstn = 1'b0, sw_rst = 1'b0, mem_init = 1'b0;
  logic        wr_en = 1'b0, rd_en = 1'b0, wr_done, rd_done;
  logic [31:0] wr_addr = '0, rd_addr = '0;
  word_t       wr_data = '0, rd_data;
  strb_t       wr_strb = '0;
  logic [1:0]  wr_resp, rd_resp;
  logic        bram_en, bram_wr_en, bram_rd_en;
  logic [AW-1:0] bram_wr_addr, bram_rd_addr;
  code_t       bram_wr_data, bram_rd_data;
  logic        psel = 0, penable = 0, pwrite = 0, st_clr = 0;
  word_t       pwdata = '0, status;
  logic [9:0]  paddr = '0;
  strb_t       pstrb = '0;
  logic        irq, init_ack;
  int          checks = 0, failures = 0;

  mem_ctrl dut (
    .MEM_ctrl_clk(clk), .MEM_ctrl_rstn(rstn), .MEM_ctrl_sw_rst(sw_rst),
    .MEM_ctrl_mem_init(mem_init),
    .MEM_ctrl_wr_en(wr_en), .MEM_ctrl_wr_addr_bus(wr_addr), .MEM_ctrl_write_data_bus(wr_data),
    .MEM_ctrl_wr_strobe(wr_strb), .MEM_ctrl_wr_done(wr_done), .wr_resp(wr_resp),
    .MEM_ctrl_rd_en(rd_en), .MEM_ctrl_rd_addr_bus(rd_addr), .MEM_ctrl_rd_done(rd_done),
    .MEM_ctrl_data_out(rd_data), .rd_resp(rd_resp),
    .BRAM_en(bram_en), .BRAM_wr_en(bram_wr_en), .BRAM_wr_addr(bram_wr_addr),
    .BRAM_wr_data(bram_wr_data), .BRAM_rd_en(bram_rd_en), .BRAM_rd_addr(bram_rd_addr),
    .BRAM_rd_data(bram_rd_data),
    .i_psel(psel), .i_penable(penable), .i_pwrite(pwrite), .i_pwdata(pwdata), .i_paddr(paddr),
    .i_pstrb(pstrb), .i_ECC_STATUS_REG_clear(st_clr), .o_ECC_STATUS_REG(status),
    .ECC_interrupt(irq), .MEM_init_ACK(init_ack));

  dual_port_ram #(.ADDR_WIDTH(AW), .MEMORY_DATA_WIDTH(39)) ram (
    .RAM_clk(clk), .RAM_rstn(rstn), .RAM_en(bram_en), .RAM_wr_en(bram_wr_en),
    .RAM_wr_addr(bram_wr_addr), .RAM_wr_data(bram_wr_data), .RAM_rd_en(bram_rd_en),
    .RAM_rd_addr(bram_rd_addr), .RAM_rd_data(bram_rd_data));

  always #5 clk = ~clk;

  word_t model [1 << AW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb_write(input logic [9:0] a, input word_t d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d; pstrb = 4'hF; penable = 0;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  // Write request; returns the response and the number of clock edges to done.
  task automatic do_write(input logic [31:0] a, input word_t d, input strb_t s,
                          output logic [1:0] resp, output int edges);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d; wr_strb = s;
    edges = 0;
    do begin @(posedge clk); edges++; @(negedge clk); end while (!wr_done);
    resp = wr_resp;
    @(posedge clk); wr_en <= 0;   // dropped after the edge that sampled done
  endtask

  task automatic do_read(input logic [31:0] a, output word_t d, output logic [1:0] resp,
                         output int edges);
    @(negedge clk); rd_en = 1; rd_addr = a;
    edges = 0;
    do begin @(posedge clk); edges++; @(negedge clk); end while (!rd_done);
    d = rd_data; resp = rd_resp;
    @(posedge clk); rd_en <= 0;
  endtask

  function automatic word_t merge(input word_t o, input word_t n, input strb_t s);
    for (int b = 0; b < 4; b++) if (s[b]) o[8*b +: 8] = n[8*b +: 8];
    return o;
  endfunction

  initial begin
    logic [1:0] resp;
    int         edges, t0;
    word_t      d;
    logic [AW-1:0] hot [8];
    foreach (hot[i]) hot[i] = AW'($urandom);
    repeat (3) @(negedge clk);
    rstn = 1;
    @(negedge clk);
    check(!init_ack, "no ack before init");

    // ---------------- initialisation
    mem_init = 1; t0 = 0;
    do begin @(posedge clk); t0++; @(negedge clk); end while (!init_ack);
    mem_init = 0;
    check(t0 == (1 << AW) + 2, $sformatf("init takes 2**AW+2 edges (got %0d)", t0));
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 64; i++) begin
      logic [AW-1:0] a;
      a = (i < 32) ? AW'(i) : AW'($urandom);
      do_read({16'h0, a, 2'b00}, d, resp, edges);
      check(d == 0 && resp == RESP_OKAY, "zero after init");
    end

    // ---------------- random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [AW-1:0] a;
      logic [31:0]   ba;
      int            kind;
      word_t         v;
      strb_t         s;
      a    = ($urandom_range(3) == 0) ? AW'($urandom) : hot[$urandom_range(7)];
      ba   = {16'h0, a, 2'($urandom)};
      kind = $urandom_range(99);
      if (kind < 3) begin
        ba[31:16] = 16'($urandom_range(65535, 1));
        do_write(ba, $urandom, 4'hF, resp, edges);
        check(resp == RESP_SLVERR && edges == 1, "write out of range");
        do_read(ba, d, resp, edges);
        check(resp == RESP_SLVERR && edges == 1, "read out of range");
      end else if (kind < 30) begin
        v = $urandom;
        do_write(ba, v, 4'hF, resp, edges);
        model[a] = v;
        check(resp == RESP_OKAY && edges == 2, "full write");
      end else if (kind < 60) begin
        v = $urandom;
        s = 4'($urandom_range(14));
        do_write(ba, v, s, resp, edges);
        model[a] = merge(model[a], v, s);
        check(resp == RESP_OKAY && edges == 3, "byte write");
      end else begin
        do_read(ba, d, resp, edges);
        check(d == model[a] && resp == RESP_OKAY && edges == 3, "read");
      end
    end
    check(status == 0 && !irq, "no ECC events in clean traffic");

    // ---------------- single-bit error injection
    apb_write(CSR_ECC_INJ_ADDR, 32'h0000_0100);
    do_write(32'h40, 32'hCAFE_F00D, 4'hF, resp, edges);
    apb_write(CSR_ECC_INJ_ADDR, 32'h0);
    do_read(32'h40, d, resp, edges);
    check(d == 32'hCAFE_F00D && resp == RESP_OKAY, "single error corrected");
    check(status[0] && !status[1] && status[15:8] == 1 && status[29:16] == 14'h10 && irq,
          "status after corrected error");
    // A byte write over the flawed word repairs it (read, correct, merge, write).
    do_write(32'h40, 32'h0000_0011, 4'b0001, resp, edges);
    check(resp == RESP_OKAY, "byte write over corrected word");
    do_read(32'h40, d, resp, edges);
    check(d == 32'hCAFE_F011 && resp == RESP_OKAY && status[15:8] == 2, "rmw repaired word");
    do_read(32'h40, d, resp, edges);
    check(status[15:8] == 2, "no new event after repair");
    @(negedge clk); st_clr = 1; @(negedge clk); st_clr = 0;
    check(status == 0 && !irq, "status clear");

    // ---------------- double-bit error injection
    apb_write(CSR_ECC_INJ_ADDR, 32'h8000_0001);
    do_write(32'h80, 32'h1234_5678, 4'hF, resp, edges);
    apb_write(CSR_ECC_INJ_ADDR, 32'h0);
    do_read(32'h80, d, resp, edges);
    check(resp == RESP_SLVERR && status[1] && status[29:16] == 14'h20 && irq, "double error detected");
    do_write(32'h80, 32'h0000_00AA, 4'b0001, resp, edges);
    check(resp == RESP_SLVERR, "byte write onto bad word refused");
    do_read(32'h80, d, resp, edges);
    check(resp == RESP_SLVERR, "bad word left as it was");
    do_write(32'h80, 32'h0BAD_BEEF, 4'hF, resp, edges);
    do_read(32'h80, d, resp, edges);
    check(resp == RESP_OKAY && d == 32'h0BAD_BEEF, "full write replaces bad word");

    // ---------------- ECC disabled
    @(negedge clk); st_clr = 1; @(negedge clk); st_clr = 0;
    apb_write(CSR_ECC_INJ_ADDR, 32'h0001_0000);
    do_write(32'hC0, 32'h5555_5555, 4'hF, resp, edges);
    apb_write(CSR_ECC_INJ_ADDR, 32'h0);
    apb_write(CSR_ECC_EN_ADDR, 32'h0);
    do_read(32'hC0, d, resp, edges);
    check(d == 32'h5554_5555 && resp == RESP_OKAY && status == 0, "ECC off: raw bits");
    apb_write(CSR_ECC_EN_ADDR, 32'h1);
    do_read(32'hC0, d, resp, edges);
    check(d == 32'h5555_5555 && status[0], "ECC on again: corrected");

    // ---------------- simultaneous requests
    begin
      bit got_w, got_r;
      int order_w, order_r, cyc;
      @(negedge clk);
      wr_en = 1; wr_addr = 32'h100; wr_data = 32'hA5A5_0001; wr_strb = 4'hF;
      rd_en = 1; rd_addr = 32'h104;
      got_w = 0; got_r = 0; cyc = 0; order_w = 0; order_r = 0;
      while (!(got_w && got_r)) begin
        @(posedge clk); cyc++;
        if (got_w) wr_en <= 0;
        if (got_r) rd_en <= 0;
        @(negedge clk);
        if (wr_done) begin got_w = 1; order_w = cyc; end
        if (rd_done) begin got_r = 1; order_r = cyc; d = rd_data; end
      end
      @(posedge clk); wr_en <= 0; rd_en <= 0;
      check(order_w != order_r, "requests served one after the other");
      check(d == model[14'h41], "simultaneous read data");
      model[14'h40] = 32'hA5A5_0001;
      do_read(32'h100, d, resp, edges);
      check(d == 32'hA5A5_0001, "simultaneous write data");
    end

    // ---------------- software reset
    apb_write(CSR_ECC_INJ_ADDR, 32'h0000_0003);
    @(negedge clk); sw_rst = 1; @(negedge clk); sw_rst = 0;
    check(!init_ack && status == 0, "software reset clears ack and status");
    do_write(32'h200, 32'h7777_8888, 4'hF, resp, edges);
    do_read(32'h200, d, resp, edges);
    check(d == 32'h7777_8888 && status == 0, "injection mask cleared by software reset");
    do_read(32'h100, d, resp, edges);
    check(d == 32'hA5A5_0001, "memory kept over software reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
