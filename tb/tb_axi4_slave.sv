// tb_axi4_slave: self-checking test of the AXI slave on its own.
//
// A responder stands in for the memory controller: it answers each held
// request after a random delay of 0-3 cycles with a one-cycle done pulse,
// keeps a byte-merged memory, and answers SLVERR for addresses at or above
// 0x1000_0000. An AXI master writes and reads random bursts (FIXED, INCR and
// WRAP, 1-16 beats, random IDs, random wvalid gaps and rready
// backpressure) and one 256-beat INCR burst, the longest AXI4 allows.
// The testbench computes every beat address itself and checks, beat by beat,
// the address, data and strobe of every request, bresp/bid, rdata/rresp/rid
// and rlast. A burst with a misplaced wlast must answer SLVERR. Reads and
// writes also run at the same time to different regions.
module tb_axi4_slave;
  import zmc_pkg::*;

  logic        clk = 1'b0, rstn = 1'b0, sw_rst = 1'b0;
  logic [3:0]  awid, wid, bid, arid, rid;
  logic [7:0]  awlen, arlen;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic [31:0] awaddr, araddr;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready;
  strb_t       wstrb;
  word_t       wdata, rdata;
  logic        s_wr_en, s_wr_done, s_rd_en, s_rd_done;
  logic [31:0] s_wr_addr, s_rd_addr;
  word_t       s_wr_data, s_rd_data;
  strb_t       s_wr_strb;
  logic [1:0]  s_wr_resp, s_rd_resp;
  int          checks = 0, failures = 0;

  axi4_slave dut (
    .axi_aclk(clk), .axi_areset_n(rstn), .axi_sw_rst(sw_rst),
    .axi_awid(awid), .axi_awlen(awlen), .axi_awburst(awburst), .axi_awaddr(awaddr),
    .axi_awvalid(awvalid), .axi_awready(awready),
    .axi_wid(wid), .axi_wstrb(wstrb), .axi_wdata(wdata), .axi_wlast(wlast),
    .axi_wvalid(wvalid), .axi_wready(wready),
    .axi_bid(bid), .axi_bresp(bresp), .axi_bvalid(bvalid), .axi_bready(bready),
    .axi_arid(arid), .axi_arlen(arlen), .axi_arburst(arburst), .axi_araddr(araddr),
    .axi_arvalid(arvalid), .axi_arready(arready),
    .axi_rid(rid), .axi_rdata(rdata), .axi_rlast(rlast), .axi_rvalid(rvalid),
    .axi_rresp(rresp), .axi_rready(rready),
    .slave_wr_en(s_wr_en), .slave_wr_addr(s_wr_addr), .slave_wr_data(s_wr_data),
    .slave_wr_strb(s_wr_strb), .slave_wr_done(s_wr_done), .slave_wr_resp(s_wr_resp),
    .slave_rd_en(s_rd_en), .slave_rd_addr(s_rd_addr), .slave_rd_done(s_rd_done),
    .slave_rd_data(s_rd_data), .slave_rd_resp(s_rd_resp));

  always #5 clk = ~clk;

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

  // ------------------------------------------------------------ responder
  word_t mem [logic [29:0]];
  logic [31:0] wr_seen_addr[$], rd_seen_addr[$];
  word_t       wr_seen_data[$];
  strb_t       wr_seen_strb[$];

  function automatic word_t mem_rd(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : {2'b0, a[31:2]};
  endfunction

  initial begin
    s_wr_done = 0; s_wr_resp = 0;
    forever begin
      @(negedge clk);
      s_wr_done = 0;
      if (s_wr_en) begin
        repeat ($urandom_range(3)) @(negedge clk);
        wr_seen_addr.push_back(s_wr_addr);
        wr_seen_data.push_back(s_wr_data);
        wr_seen_strb.push_back(s_wr_strb);
        if (s_wr_addr < 32'h1000_0000) begin
          word_t o;
          o = mem_rd(s_wr_addr);
          for (int b = 0; b < 4; b++) if (s_wr_strb[b]) o[8*b +: 8] = s_wr_data[8*b +: 8];
          mem[s_wr_addr[31:2]] = o;
          s_wr_resp = RESP_OKAY;
        end else s_wr_resp = RESP_SLVERR;
        s_wr_done = 1;
        @(negedge clk);
        s_wr_done = 0;
      end
    end
  end

  initial begin
    s_rd_done = 0; s_rd_resp = 0; s_rd_data = 0;
    forever begin
      @(negedge clk);
      s_rd_done = 0;
      if (s_rd_en) begin
        repeat ($urandom_range(3)) @(negedge clk);
        rd_seen_addr.push_back(s_rd_addr);
        s_rd_data = mem_rd(s_rd_addr);
        s_rd_resp = (s_rd_addr < 32'h1000_0000) ? RESP_OKAY : RESP_SLVERR;
        s_rd_done = 1;
        @(negedge clk);
        s_rd_done = 0;
      end
    end
  end

  // --------------------------------------------------------------- master
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

  int wbursts = 0, rbursts = 0, wraps = 0, fixeds = 0, slverrs = 0;

  task automatic axi_write(input logic [31:0] a, input logic [1:0] burst, input int len,
                           input bit bad_last);
    word_t d [];
    strb_t s [];
    logic [3:0] id;
    bit    any_err;
    d = new[len + 1]; s = new[len + 1];
    id = 4'($urandom);
    wr_seen_addr.delete(); wr_seen_data.delete(); wr_seen_strb.delete();
    @(negedge clk);
    awvalid = 1; awaddr = a; awburst = burst; awlen = 8'(len); awid = id;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; awaddr = $urandom;
    for (int i = 0; i <= len; i++) begin
      while ($urandom_range(2) == 0) @(negedge clk);
      d[i] = $urandom; s[i] = 4'($urandom_range(15, 1));
      wvalid = 1; wdata = d[i]; wstrb = s[i]; wid = id;
      wlast = bad_last ? (i == len - 1 || len == 0 && 1'b0) : (i == len);
      do @(posedge clk); while (!wready);
      @(negedge clk); wvalid = 0; wdata = $urandom;
    end
    bready = 0;
    repeat ($urandom_range(2)) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    any_err = 0;
    check(wr_seen_addr.size() == len + 1, "write beat count");
    for (int i = 0; i <= len && i < wr_seen_addr.size(); i++) begin
      logic [31:0] ea = beat_addr(a, burst, len, i);
      check(wr_seen_addr[i] == ea && wr_seen_data[i] == d[i] && wr_seen_strb[i] == s[i],
            $sformatf("write beat %0d addr %h exp %h", i, wr_seen_addr[i], ea));
      if (ea >= 32'h1000_0000) any_err = 1;
    end
    check(bid == id, "bid");
    check(bresp == ((any_err || bad_last) ? RESP_SLVERR : RESP_OKAY), "bresp");
    if (bresp == RESP_SLVERR) slverrs++;
    @(negedge clk); bready = 0;
    wbursts++;
  endtask

  task automatic axi_read(input logic [31:0] a, input logic [1:0] burst, input int len);
    logic [3:0] id;
    id = 4'($urandom);
    rd_seen_addr.delete();
    @(negedge clk);
    arvalid = 1; araddr = a; arburst = burst; arlen = 8'(len); arid = id;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0; araddr = $urandom;
    for (int i = 0; i <= len; i++) begin
      logic [31:0] ea;
      ea = beat_addr(a, burst, len, i);
      rready = 0;
      while ($urandom_range(2) == 0) @(negedge clk);
      rready = 1;
      do @(posedge clk); while (!rvalid);
      check(rdata == mem_rd(ea) && rid == id && rlast == (i == len) &&
            rresp == ((ea < 32'h1000_0000) ? RESP_OKAY : RESP_SLVERR),
            $sformatf("read beat %0d", i));
      @(negedge clk); rready = 0;
    end
    check(rd_seen_addr.size() == len + 1, "read beat count");
    for (int i = 0; i <= len && i < rd_seen_addr.size(); i++)
      check(rd_seen_addr[i] == beat_addr(a, burst, len, i), "read beat address");
    rbursts++;
  endtask

  task automatic rand_burst(output logic [31:0] a, output logic [1:0] burst, output int len,
                            input logic [31:0] region);
    burst = 2'($urandom_range(2));
    if (burst == BURST_WRAP) len = (1 << $urandom_range(1, 4)) - 1;
    else                     len = $urandom_range(15);
    a = region + 32'($urandom_range(255)) * 4;
    if (burst == BURST_WRAP) wraps++;
    if (burst == BURST_FIXED) fixeds++;
  endtask

  initial begin
    logic [31:0] a;
    logic [1:0]  burst;
    int          len;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awid = 0; wid = 0; arid = 0; awlen = 0; arlen = 0; awburst = 0; arburst = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; wlast = 0;
    repeat (3) @(negedge clk);
    rstn = 1;
    for (int n = 0; n < 60; n++) begin
      rand_burst(a, burst, len, (n % 10 == 9) ? 32'h0FFF_FFC0 : 32'h0000_1000);
      axi_write(a, burst, len, 1'b0);
      axi_read(a, burst, len);
    end
    // the longest AXI4 burst: 256 beats
    axi_write(32'h0000_3000, BURST_INCR, 255, 1'b0);
    axi_read(32'h0000_3000, BURST_INCR, 255);
    // wlast on the wrong beat
    axi_write(32'h2000, BURST_INCR, 3, 1'b1);
    // concurrent read and write bursts on different regions
    for (int n = 0; n < 20; n++) begin
      logic [31:0] a2;
      logic [1:0]  b2;
      int          l2;
      rand_burst(a, burst, len, 32'h0000_4000);
      rand_burst(a2, b2, l2, 32'h0000_8000);
      fork
        axi_write(a, burst, len, 1'b0);
        axi_read(a2, b2, l2);
      join
    end
    check(wraps > 0 && fixeds > 0 && slverrs > 1, "all burst kinds and errors exercised");
    $display("bursts: write %0d read %0d wrap %0d fixed %0d slverr %0d",
             wbursts, rbursts, wraps, fixeds, slverrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
