// wait_st_logic: wait-state generator and memory/IO strobes.
//
// Lets the processor talk to slower memories and IO devices. Each access type
// has its own two-bit wait select (0 to 3 wait states): iwsel for IO,
// promwsel for PROM and ramwsel for RAM. RAM accesses get EDAC_WAIT more
// wait states because the EDAC needs time to check or encode the word. An
// access to the 1553 chip (cs_1553_n=0) is not counted: ready follows the
// chip's own rdy_1553_n.
//
// A counter is cleared while ds_n is high and counts pclk rising edges while
// ds_n is low. cpu_rdy_n goes low (ready) once the count reaches the selected
// number of wait states, so a select of N holds cpu_rdy_n high for exactly N
// clocks of the data strobe before it goes low. start_cycle is high during
// the first clock of ds_n low. The strobes are combinational:
//   mwr_n  = 0 while ds_n=0, wr_n=0, m_ion=1 (memory write)
//   mrd_n  = 0 while ds_n=0, rd_n=0, m_ion=1 (memory read)
//   iowr_n = 0 while ds_n=0, wr_n=0, m_ion=0 (IO write)
//
// The port list, the four selectable wait states and the extra EDAC wait
// state follow the design description. The counting scheme, the timing of
// start_cycle and the strobe equations are this design's choices.
module wait_st_logic
  import pim_pkg::*;
#(
  parameter int unsigned EDAC_WAIT = 1
) (
  input  logic  pclk,
  input  logic  por,
  input  wsel_t iwsel,
  input  wsel_t promwsel,
  input  wsel_t ramwsel,
  input  logic  m_ion,
  input  logic  ds_n,
  input  logic  wr_n,
  input  logic  rd_n,
  input  logic  rdy_1553_n,
  input  logic  ram_sel,
  input  logic  cs_1553_n,
  output logic  cpu_rdy_n,
  output logic  start_cycle,
  output logic  mwr_n,
  output logic  mrd_n,
  output logic  iowr_n
);
  localparam int unsigned CNT_W = 3;

  access_e          acc;
  logic [CNT_W-1:0] nwait;
  logic [CNT_W-1:0] cnt;
  logic             ds_seen;   // ds_n was low at the previous pclk edge

  always_comb begin
    if (!m_ion)          acc = ACC_IO;
    else if (!cs_1553_n) acc = ACC_1553;
    else if (ram_sel)    acc = ACC_RAM;
    else                 acc = ACC_PROM;
  end

  always_comb begin
    unique case (acc)
      ACC_IO:   nwait = CNT_W'(iwsel);
      ACC_RAM:  nwait = CNT_W'(ramwsel) + CNT_W'(EDAC_WAIT);
      ACC_PROM: nwait = CNT_W'(promwsel);
      default:  nwait = '0;
    endcase
  end

  always_ff @(posedge pclk or posedge por) begin
    if (por) begin
      cnt     <= '0;
      ds_seen <= 1'b0;
    end else begin
      ds_seen <= !ds_n;
      if (ds_n)            cnt <= '0;
      else if (!(&cnt))    cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    if (ds_n)                cpu_rdy_n = 1'b1;
    else if (acc == ACC_1553) cpu_rdy_n = rdy_1553_n;
    else                     cpu_rdy_n = !(cnt >= nwait);
  end

  assign start_cycle = !ds_n && !ds_seen;
  assign mwr_n  = !(!ds_n && !wr_n &&  m_ion);
  assign mrd_n  = !(!ds_n && !rd_n &&  m_ion);
  assign iowr_n = !(!ds_n && !wr_n && !m_ion);

  a_not_ready_idle: assert property (@(posedge pclk) disable iff (por) ds_n |-> cpu_rdy_n);
endmodule
