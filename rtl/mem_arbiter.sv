// mem_arbiter: connects the IO port and the calculation lanes to memories A and B.
//
// IO side: one access per cycle to the memory io_mem_b selects, at io_bank / io_addr; io_we
// writes io_wdata and the word that was there is read at the same time (io_rdata, one cycle
// later), so a new symbol goes in exactly where the previous result comes out. Calc side: up to
// five lanes, each naming a bank and an address of memory calc_mem_b; the words read are
// routed from their banks to lanes x[0..4] one cycle later, and the PE results y, valid
// PE_LAT = 2 cycles after the issue, are written back to the same banks and addresses (in place).
// The two sides are meant to use different memories; assertions check that, and that no two
// lanes of a butterfly use one bank.
module mem_arbiter
  import fft_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  // IO side
  input  logic                          io_mem_b,
  input  logic                          io_we,
  input  logic [2:0]                    io_bank,
  input  logic [ADDR_W-1:0]             io_addr,
  input  cplx_t                         io_wdata,
  output cplx_t                         io_rdata,
  // calculation side
  input  logic                          calc_mem_b,
  input  logic [NBANK-1:0]              lane_valid,
  input  logic [NBANK-1:0][2:0]         lane_bank,
  input  logic [NBANK-1:0][ADDR_W-1:0]  lane_addr,
  output cplx_t [NBANK-1:0]             x,
  input  cplx_t [NBANK-1:0]             y,
  // memories A (index 0) and B (index 1)
  output logic  [1:0][NBANK-1:0][ADDR_W-1:0] m_raddr,
  output logic  [1:0][NBANK-1:0]             m_we,
  output logic  [1:0][NBANK-1:0][ADDR_W-1:0] m_waddr,
  output cplx_t [1:0][NBANK-1:0]             m_wdata,
  input  cplx_t [1:0][NBANK-1:0]             m_rdata
);
  // issue information delayed to the read-data cycle (1) and the write-back cycle (2)
  logic [1:0]                         c_mem_d;
  logic [1:0][NBANK-1:0]              c_val_d;
  logic [1:0][NBANK-1:0][2:0]         c_bank_d;
  logic [1:0][NBANK-1:0][ADDR_W-1:0]  c_addr_d;
  logic                               io_mem_d1;
  logic [2:0]                         io_bank_d1;

  always_ff @(posedge clk) begin
    if (rst) begin
      c_val_d <= '0;
    end else begin
      c_val_d  <= {c_val_d[0], lane_valid};
    end
    c_mem_d    <= {c_mem_d[0], calc_mem_b};
    c_bank_d   <= {c_bank_d[0], lane_bank};
    c_addr_d   <= {c_addr_d[0], lane_addr};
    io_mem_d1  <= io_mem_b;
    io_bank_d1 <= io_bank;
  end

  always_comb begin
    m_raddr = '0;
    m_we    = '0;
    m_waddr = '0;
    m_wdata = '0;
    for (int m = 0; m < 2; m++) begin
      if (io_mem_b == m[0]) begin
        m_raddr[m][io_bank] = io_addr;
        m_we[m][io_bank]    = io_we;
        m_waddr[m][io_bank] = io_addr;
        m_wdata[m][io_bank] = io_wdata;
      end
      if (calc_mem_b == m[0])
        for (int l = 0; l < NBANK; l++)
          if (lane_valid[l]) m_raddr[m][lane_bank[l]] = lane_addr[l];
      if (c_mem_d[1] == m[0])
        for (int l = 0; l < NBANK; l++)
          if (c_val_d[1][l]) begin
            m_we[m][c_bank_d[1][l]]    = 1'b1;
            m_waddr[m][c_bank_d[1][l]] = c_addr_d[1][l];
            m_wdata[m][c_bank_d[1][l]] = y[l];
          end
    end
    for (int l = 0; l < NBANK; l++) x[l] = m_rdata[c_mem_d[0]][c_bank_d[0][l]];
    io_rdata = m_rdata[io_mem_d1][io_bank_d1];
  end

  // no two operands of one issue in the same bank
  always_ff @(posedge clk)
    if (!rst)
      for (int a = 0; a < NBANK; a++)
        for (int b = a + 1; b < NBANK; b++)
          assert (!(lane_valid[a] && lane_valid[b] && lane_bank[a] == lane_bank[b]))
            else $error("bank conflict between lanes %0d and %0d", a, b);

  // IO never touches the memory being calculated
  always_ff @(posedge clk)
    if (!rst) assert (!(io_we && (|lane_valid) && io_mem_b == calc_mem_b))
      else $error("IO and calculation on the same memory");
endmodule
