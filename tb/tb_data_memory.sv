// tb_data_memory: random writes and reads on all five banks against a shadow copy.
// Checks one-cycle read latency, the depths (512 words in banks 0..3, 240 in bank 4) and that
// a read and a write of the same address in one cycle return the old word.
module tb_data_memory;
  import fft_pkg::*;
  logic clk = 0;
  logic [NBANK-1:0][ADDR_W-1:0] raddr, waddr;
  logic [NBANK-1:0] we;
  cplx_t [NBANK-1:0] wdata, rdata;
  cplx_t shadow [NBANK][512];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  data_memory dut (.clk, .raddr, .we, .waddr, .wdata, .rdata);

  initial begin
    cplx_t expq [NBANK];
    // fill every word
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      for (int b = 0; b < NBANK; b++) begin
        we[b] = (b < 4) || (a < DEPTH_LAST);
        waddr[b] = ADDR_W'(a);
        wdata[b] = {24'(a * 7 + b), 24'($urandom)};
        if (we[b]) shadow[b][a] = wdata[b];
        raddr[b] = '0;
      end
    end
    @(negedge clk);
    we = '0;
    for (int t = 0; t < 4000; t++) begin
      for (int b = 0; b < NBANK; b++) begin
        int depth;
        depth = (b < 4) ? DEPTH_MAIN : DEPTH_LAST;
        raddr[b] = ADDR_W'($urandom_range(depth - 1, 0));
        we[b] = 1'($urandom_range(1, 0));
        waddr[b] = (t % 3 == 0) ? raddr[b] : ADDR_W'($urandom_range(depth - 1, 0));
        wdata[b] = {24'($urandom), 24'($urandom)};
        expq[b] = shadow[b][raddr[b]];
      end
      @(negedge clk);
      for (int b = 0; b < NBANK; b++) begin
        checks++;
        if (rdata[b] != expq[b]) failures++;
        if (we[b]) shadow[b][waddr[b]] = wdata[b];
      end
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
