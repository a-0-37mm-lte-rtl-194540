// tb_mem_arbiter: the arbiter with two real memories.
// The IO side streams writes into one memory and must read back the previous word at the same
// place one cycle later; at the same time calculation lanes with distinct banks read the other
// memory (operands must arrive on the right lanes one cycle later) and the testbench returns a
// result two cycles after the issue, which must land at the lane's bank and address. Roles of
// the memories swap halfway. A shadow model of both memories gives the expected words.
module tb_mem_arbiter;
  import fft_pkg::*;
  logic clk = 0, rst = 1;
  logic io_mem_b = 0, io_we = 0, calc_mem_b = 1;
  logic [2:0] io_bank = 0;
  logic [ADDR_W-1:0] io_addr = 0;
  cplx_t io_wdata, io_rdata;
  logic [NBANK-1:0] lane_valid = 0;
  logic [NBANK-1:0][2:0] lane_bank;
  logic [NBANK-1:0][ADDR_W-1:0] lane_addr;
  cplx_t [NBANK-1:0] x, y, y_q;
  logic  [1:0][NBANK-1:0][ADDR_W-1:0] m_raddr, m_waddr;
  logic  [1:0][NBANK-1:0] m_we;
  cplx_t [1:0][NBANK-1:0] m_wdata, m_rdata;
  cplx_t shadow [2][NBANK][16];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  mem_arbiter dut (.clk, .rst, .io_mem_b, .io_we, .io_bank, .io_addr, .io_wdata, .io_rdata,
    .calc_mem_b, .lane_valid, .lane_bank, .lane_addr, .x, .y, .m_raddr, .m_we, .m_waddr,
    .m_wdata, .m_rdata);
  for (genvar m = 0; m < 2; m++) begin : g_mem
    data_memory u_mem (.clk, .raddr(m_raddr[m]), .we(m_we[m]), .waddr(m_waddr[m]),
                       .wdata(m_wdata[m]), .rdata(m_rdata[m]));
  end

  // results: operands + (1, 1), two cycles after the issue
  always_ff @(posedge clk)
    for (int l = 0; l < NBANK; l++) begin
      y_q[l].re <= x[l].re + 1;
      y_q[l].im <= x[l].im + 1;
    end
  assign y = y_q;

  initial begin
    int perm [5];
    cplx_t exp_io, exp_x [5];
    logic [2:0] bq [2][5];
    logic [ADDR_W-1:0] aq [2][5];
    logic [4:0] vq [2];
    logic mq [2];
    @(negedge clk);
    rst = 0;
    // fill both memories through the IO side
    for (int m = 0; m < 2; m++)
      for (int b = 0; b < NBANK; b++)
        for (int a = 0; a < 16; a++) begin
          io_mem_b = m[0]; io_we = 1; io_bank = 3'(b); io_addr = ADDR_W'(a);
          io_wdata = {24'(m * 1000 + b * 100 + a), 24'(a)};
          shadow[m][b][a] = io_wdata;
          @(negedge clk);
        end
    io_we = 0;
    vq[0] = 0; vq[1] = 0;
    for (int t = 0; t < 2000; t++) begin
      bit iom;
      iom = (t >= 1000);
      // write-back of the issue two cycles ago happens in this cycle
      // IO access
      io_mem_b = iom; calc_mem_b = !iom;
      io_we = 1;
      io_bank = 3'($urandom_range(4, 0));
      io_addr = ADDR_W'($urandom_range(15, 0));
      io_wdata = {24'($urandom), 24'($urandom)};
      exp_io = shadow[iom][io_bank][io_addr];
      // calc issue: a random permutation of the banks, random addresses
      for (int l = 0; l < 5; l++) perm[l] = l;
      for (int l = 4; l > 0; l--) begin
        int r, tmp;
        r = $urandom_range(l, 0);
        tmp = perm[l]; perm[l] = perm[r]; perm[r] = tmp;
      end
      for (int l = 0; l < NBANK; l++) begin
        lane_valid[l] = (t % 7 != 6) && (t < 1995);
        lane_bank[l] = 3'(perm[l]);
        lane_addr[l] = ADDR_W'($urandom_range(15, 0));
      end
      // a location written back in this cycle is read with its old value
      for (int l = 0; l < NBANK; l++) exp_x[l] = shadow[!iom][lane_bank[l]][lane_addr[l]];
      @(negedge clk);
      shadow[iom][io_bank][io_addr] = io_wdata;
      checks++;
      if (io_rdata != exp_io) failures++;
      for (int l = 0; l < NBANK; l++) if (lane_valid[l]) begin
        checks++;
        if (x[l] != exp_x[l]) failures++;
      end
      // the results of this issue are written during the next cycle
      for (int l = 0; l < NBANK; l++) if (lane_valid[l]) begin
        shadow[!iom][lane_bank[l]][lane_addr[l]].re = x[l].re + 1;
        shadow[!iom][lane_bank[l]][lane_addr[l]].im = x[l].im + 1;
      end
      lane_valid = '0;
      io_we = 0;
      @(negedge clk);   // write-back cycle
      @(negedge clk);   // the written words are readable from here on
    end
    // read everything back through the IO side
    io_we = 0;
    for (int m = 0; m < 2; m++)
      for (int b = 0; b < NBANK; b++)
        for (int a = 0; a < 16; a++) begin
          io_mem_b = m[0]; io_bank = 3'(b); io_addr = ADDR_W'(a);
          @(negedge clk);
          checks++;
          if (io_rdata != shadow[m][b][a]) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
