// tb_zmc_axi4_top: end-to-end test of the whole controller at its default
// parameters (16384-word RAM, 4-bit burst length, 10-bit register address).
//
// An AXI master and an APB-style register master drive the top-level ports;
// the testbench keeps its own byte-level model of the memory and computes
// every burst's beat addresses itself. Steps:
//   1. reset, memory initialisation (MEM_init_ACK after 2**14 + 2 edges),
//      all words read back as zero;
//   2. single-beat latency: bvalid 4 edges after the AW handshake for a
//      full-word write, 5 for a byte write; rvalid 4 edges after AR;
//      16-beat INCR burst throughput: 4 edges per write beat, 5 per read beat;
//   3. random FIXED/INCR/WRAP bursts with random byte strobes, wvalid gaps and
//      bready/rready backpressure, checked against the model;
//   4. ECC: single-bit injection -> corrected read, status and interrupt;
//      status clear; double-bit injection -> SLVERR read, byte write refused;
//      ECC disabled -> raw bits;
//   5. out-of-range address, misplaced wlast, simultaneous read and write
//      bursts, software reset, and a second initialisation.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_zmc_axi4_top;
  import zmc_pkg::*;

  localparam int AW = 14;

  logic        clk = 1'b0, rstn = 1'b0, sw_rst = 1'b0, mem_init = 1'b0;
  logic [31:0] awaddr, araddr;
  logic [3:0]  awlen, arlen;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bready, bvalid;
  logic        arvalid, arready, rready, rlast, rvalid;
  word_t       wdata, rdata, pwdata, status;
  strb_t       wstrb, pstrb;
  logic        psel, penable, pwrite, st_clr, irq, init_ack;
  logic [9:0]  paddr;
  int          checks = 0, failures = 0;

  zmc_axi4_top dut (
    .zmc_top_clk(clk), .zmc_top_rstn(rstn), .zmc_top_sw_rst(sw_rst), .zmc_top_mem_init(mem_init),
    .awaddr(awaddr), .awlen(awlen), .awburst(awburst), .awvalid(awvalid), .awready(awready),
    .wdata(wdata), .wlast(wlast), .wstrb(wstrb), .wvalid(wvalid), .wready(wready),
    .bready(bready), .bvalid(bvalid), .bresp(bresp),
    .araddr(araddr), .arlen(arlen), .arburst(arburst), .arvalid(arvalid), .arready(arready),
    .rready(rready), .rdata(rdata), .rlast(rlast), .rresp(rresp), .rvalid(rvalid),
    .i_psel(psel), .i_penable(penable), .i_pwrite(pwrite), .i_pwdata(pwdata), .i_paddr(paddr),
    .i_pstrb(pstrb), .i_ECC_STAUS_REG_clear(st_clr), .ECC_interrupt(irq),
    .O_ECC_STATUS_REG(status), .MEM_init_ACK(init_ack));

  always #5 clk = ~clk;

  // mechanism counters
  typedef enum int {
    M_INIT, M_FULL_WR, M_BYTE_WR, M_READ, M_INCR, M_FIXED, M_WRAP, M_CORRECTED,
    M_UNCORRECTABLE, M_RMW_REFUSED, M_OUT_OF_RANGE, M_ECC_OFF, M_STATUS_CLEAR,
    M_CONCURRENT, M_BACKPRESSURE, M_BAD_WLAST, M_SW_RESET, M_NUM
  } mech_e;
  int mech [M_NUM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- model
  word_t model [1 << AW];
  bit    bad   [1 << AW];   // word holds an uncorrectable error

  function automatic bit in_range(input logic [31:0] a);
    return a < (32'h4 << AW);
  endfunction

  function automatic logic [31:0] beat_addr(input logic [31:0] a, input logic [1:0] burst,
                                            input int len, input int i);
    int unsigned span;
    logic [31:0] base;
    case (burst)
      BURST_FIXED: return a;
      BURST_WRAP: begin
        span = 4 * (len + 1);
        base = (a / span) * span;
        return base + ((a - base + 4 * i) % span);
      end
      default: return a + 4 * i;
    endcase
  endfunction

  // ------------------------------------------------------ bus masters
  task automatic apb_write(input logic [9:0] a, input word_t d);
    @(negedge clk); psel = 1; pwrite = 1; paddr = a; pwdata = d; pstrb = 4'hF; penable = 0;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  // Write burst. strb_mode: 0 random, 1 all bytes, 2 two middle bytes. Returns bresp and the
  // number of edges from the AW handshake to bvalid (gaps/backpressure off
  // when timed).
  task automatic axi_write(input logic [31:0] a, input logic [1:0] burst, input int len,
                           input int strb_mode, input bit timed, input bit bad_last,
                           output logic [1:0] resp, output int edges);
    word_t d; strb_t s; logic [31:0] ea;
    bit    err;
    d = $urandom;
    s = (strb_mode == 1) ? 4'hF : (strb_mode == 2) ? 4'b0110 : 4'($urandom_range(15, 1));
    @(negedge clk);
    awvalid = 1; awaddr = a; awburst = burst; awlen = 4'(len);
    wvalid = timed; wdata = d; wstrb = s; wlast = bad_last ? 1'b1 : (len == 0);
    do @(posedge clk); while (!awready);
    edges = 0;
    @(negedge clk); awvalid = 0;
    err = bad_last;
    for (int i = 0; i <= len; i++) begin
      if (!timed) begin
        wvalid = 0;
        while ($urandom_range(3) == 0) begin @(posedge clk); edges++; @(negedge clk); end
      end
      if (i > 0) begin
        d = $urandom;
        s = (strb_mode == 1) ? 4'hF : (strb_mode == 2) ? 4'b0110 : 4'($urandom_range(15, 1));
      end
      wvalid = 1; wdata = d; wstrb = s;
      wlast = bad_last ? (i == 0) : (i == len);
      do begin @(posedge clk); edges++; end while (!wready);
      @(negedge clk); wvalid = 0;
      ea = beat_addr(a, burst, len, i);
      if (!in_range(ea)) err = 1;
      else if (s != 4'hF && bad[ea[AW+1:2]]) begin
        err = 1; mech[M_RMW_REFUSED]++;
      end else begin
        for (int b = 0; b < 4; b++) if (s[b]) model[ea[AW+1:2]][8*b +: 8] = d[8*b +: 8];
        if (s == 4'hF) bad[ea[AW+1:2]] = 0;
        if (s == 4'hF) mech[M_FULL_WR]++; else mech[M_BYTE_WR]++;
      end
    end
    if (!timed && $urandom_range(1) != 0) begin
      bready = 0;
      repeat ($urandom_range(1, 3)) begin @(posedge clk); edges++; @(negedge clk); end
      if (bvalid) mech[M_BACKPRESSURE]++;
    end
    bready = 1;
    while (!bvalid) begin @(posedge clk); edges++; @(negedge clk); end
    resp = bresp;
    check(resp == (err ? RESP_SLVERR : RESP_OKAY), $sformatf("bresp %0d for burst at %h", resp, a));
    @(posedge clk); @(negedge clk); bready = 0;
    if (burst == BURST_INCR) mech[M_INCR]++;
    if (burst == BURST_FIXED) mech[M_FIXED]++;
    if (burst == BURST_WRAP) mech[M_WRAP]++;
  endtask

  // Read burst checked against the model; edges counts from the AR handshake
  // to the last rvalid.
  task automatic axi_read(input logic [31:0] a, input logic [1:0] burst, input int len,
                          input bit timed, output int edges, output logic [1:0] last_resp);
    logic [31:0] ea;
    @(negedge clk);
    arvalid = 1; araddr = a; arburst = burst; arlen = 4'(len);
    do @(posedge clk); while (!arready);
    edges = 0;
    @(negedge clk); arvalid = 0;
    for (int i = 0; i <= len; i++) begin
      ea = beat_addr(a, burst, len, i);
      rready = timed;
      if (!timed) begin
        while ($urandom_range(2) == 0) begin
          @(posedge clk); edges++; @(negedge clk);
          if (rvalid) mech[M_BACKPRESSURE]++;
        end
        rready = 1;
      end
      while (!rvalid) begin @(posedge clk); edges++; @(negedge clk); end
      last_resp = rresp;
      if (!in_range(ea) || bad[ea[AW+1:2]])
        check(rresp == RESP_SLVERR && rlast == (i == len), $sformatf("read error beat at %h", ea));
      else begin
        check(rresp == RESP_OKAY && rdata == model[ea[AW+1:2]] && rlast == (i == len),
              $sformatf("read beat at %h: got %h exp %h", ea, rdata, model[ea[AW+1:2]]));
        mech[M_READ]++;
      end
      if (i < len) begin @(posedge clk); edges++; @(negedge clk); end
    end
    @(posedge clk); @(negedge clk); rready = 0;
  endtask

  task automatic init_memory();
    int t;
    @(negedge clk);
    mem_init = 1; t = 0;
    do begin @(posedge clk); t++; @(negedge clk); end while (!init_ack);
    mem_init = 0;
    check(t == (1 << AW) + 2, $sformatf("initialisation time %0d edges", t));
    foreach (model[i]) begin model[i] = '0; bad[i] = 0; end
    mech[M_INIT]++;
  endtask

  task automatic rand_burst(output logic [31:0] a, output logic [1:0] burst, output int len,
                            input logic [31:0] base, input int words);
    burst = 2'($urandom_range(2));
    len   = (burst == BURST_WRAP) ? (1 << $urandom_range(1, 4)) - 1 : $urandom_range(15);
    a     = base + 4 * $urandom_range(words - 1);
  endtask

  initial begin
    logic [1:0]  resp;
    int          edges;
    logic [31:0] a;
    logic [1:0]  burst;
    int          len;
    logic [31:0] hot [4];
    foreach (mech[i]) mech[i] = 0;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; awlen = 0; arlen = 0; awburst = 0; arburst = 0;
    wdata = 0; wstrb = 0; wlast = 0;
    psel = 0; penable = 0; pwrite = 0; pwdata = 0; paddr = 0; pstrb = 0; st_clr = 0;
    foreach (hot[i]) hot[i] = 32'($urandom_range((1 << AW) - 64)) * 4;
    repeat (3) @(negedge clk);
    rstn = 1;
    @(negedge clk);
    check(!init_ack, "no init ack after reset");

    // 1. initialisation
    init_memory();
    for (int i = 0; i < 8; i++) begin
      axi_read(32'h0 + 64 * i, BURST_INCR, 15, 1'b0, edges, resp);
    end

    // 2. latency and throughput
    axi_write(32'h100, BURST_INCR, 0, 1, 1'b1, 1'b0, resp, edges);
    check(edges == 4, $sformatf("full-word write latency %0d", edges));
    axi_write(32'h104, BURST_INCR, 0, 2, 1'b1, 1'b0, resp, edges);
    check(edges == 5, $sformatf("byte write latency %0d", edges));
    axi_read(32'h100, BURST_INCR, 0, 1'b1, edges, resp);
    check(edges == 4, $sformatf("read latency %0d", edges));
    axi_write(32'h200, BURST_INCR, 15, 1, 1'b1, 1'b0, resp, edges);
    check(edges == 4 * 16, $sformatf("16-beat write burst %0d edges", edges));
    axi_read(32'h200, BURST_INCR, 15, 1'b1, edges, resp);
    check(edges == 4 + 5 * 15, $sformatf("16-beat read burst %0d edges", edges));

    // 3. random traffic
    for (int n = 0; n < 150; n++) begin
      rand_burst(a, burst, len, hot[$urandom_range(3)], 64);
      axi_write(a, burst, len, 0, 1'b0, 1'b0, resp, edges);
      rand_burst(a, burst, len, hot[$urandom_range(3)], 64);
      axi_read(a, burst, len, 1'b0, edges, resp);
    end

    // 4. ECC
    apb_write(CSR_ECC_INJ_ADDR, 32'h0004_0000);
    axi_write(32'h300, BURST_INCR, 0, 1, 1'b0, 1'b0, resp, edges);
    apb_write(CSR_ECC_INJ_ADDR, 32'h0);
    check(!irq, "no interrupt before the faulty word is read");
    axi_read(32'h300, BURST_INCR, 0, 1'b0, edges, resp);
    check(resp == RESP_OKAY && status[0] && !status[1] && status[29:16] == 14'(32'h300 >> 2) && irq,
          "corrected error reported");
    if (status[0]) mech[M_CORRECTED]++;
    @(negedge clk); st_clr = 1; @(negedge clk); st_clr = 0;
    check(status == 0 && !irq, "status cleared");
    mech[M_STATUS_CLEAR]++;

    apb_write(CSR_ECC_INJ_ADDR, 32'h0000_0300);
    axi_write(32'h400, BURST_INCR, 1, 1, 1'b0, 1'b0, resp, edges);
    apb_write(CSR_ECC_INJ_ADDR, 32'h0);
    bad[32'h400 >> 2] = 1; bad[32'h404 >> 2] = 1;
    axi_read(32'h400, BURST_INCR, 1, 1'b0, edges, resp);
    check(status[1] && irq, "uncorrectable error reported");
    if (status[1]) mech[M_UNCORRECTABLE]++;
    // byte write onto the bad word is refused; the model's 'bad' flag makes
    // axi_write expect SLVERR
    axi_write(32'h400, BURST_INCR, 0, 0, 1'b0, 1'b0, resp, edges);
    axi_write(32'h400, BURST_INCR, 1, 1, 1'b0, 1'b0, resp, edges);   // full writes repair
    axi_read(32'h400, BURST_INCR, 1, 1'b0, edges, resp);

    apb_write(CSR_ECC_INJ_ADDR, 32'h0000_0001);
    axi_write(32'h500, BURST_INCR, 0, 1, 1'b0, 1'b0, resp, edges);
    apb_write(CSR_ECC_INJ_ADDR, 32'h0);
    apb_write(CSR_ECC_EN_ADDR, 32'h0);
    model[32'h500 >> 2] ^= 32'h1;
    @(negedge clk); st_clr = 1; @(negedge clk); st_clr = 0;
    axi_read(32'h500, BURST_INCR, 0, 1'b0, edges, resp);
    check(status == 0, "ECC off: no event");
    if (status == 0 && resp == RESP_OKAY) mech[M_ECC_OFF]++;
    apb_write(CSR_ECC_EN_ADDR, 32'h1);
    model[32'h500 >> 2] ^= 32'h1;
    axi_read(32'h500, BURST_INCR, 0, 1'b0, edges, resp);
    check(status[0], "ECC on again: corrected");

    // 5. out of range, wlast, concurrency, software reset, re-initialisation
    axi_write(32'h4_0000, BURST_INCR, 1, 0, 1'b0, 1'b0, resp, edges);
    axi_read(32'h3_FFFC, BURST_INCR, 1, 1'b0, edges, resp);
    if (resp == RESP_SLVERR) mech[M_OUT_OF_RANGE]++;

    axi_write(32'h600, BURST_INCR, 3, 1, 1'b0, 1'b1, resp, edges);
    if (resp == RESP_SLVERR) mech[M_BAD_WLAST]++;

    for (int n = 0; n < 10; n++) begin
      logic [31:0] a2; logic [1:0] b2; int l2, e2; logic [1:0] r2;
      rand_burst(a, burst, len, 32'h1000, 64);
      rand_burst(a2, b2, l2, 32'h2000, 64);
      fork
        axi_write(a, burst, len, 0, 1'b0, 1'b0, resp, edges);
        axi_read(a2, b2, l2, 1'b0, e2, r2);
      join
      mech[M_CONCURRENT]++;
    end

    apb_write(CSR_ECC_INJ_ADDR, 32'h0000_00FF);
    @(negedge clk); sw_rst = 1; @(negedge clk); sw_rst = 0;
    check(!init_ack && status == 0 && !irq, "software reset clears ack and status");
    axi_write(32'h700, BURST_INCR, 3, 1, 1'b0, 1'b0, resp, edges);
    axi_read(32'h700, BURST_INCR, 3, 1'b0, edges, resp);
    axi_read(32'h200, BURST_INCR, 15, 1'b0, edges, resp);  // contents kept
    check(status == 0, "injection mask cleared by software reset");
    mech[M_SW_RESET]++;

    init_memory();
    axi_read(32'h200, BURST_INCR, 15, 1'b0, edges, resp);
    axi_read(32'h1000, BURST_INCR, 15, 1'b0, edges, resp);

    foreach (mech[i]) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-16s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
