`timescale 1ps/1ps
// host_regs: register interface between the PC (ISA bus card) and the timing
// logic.
//
// The PC reads the event times of all timer units and programs and arms the
// range gate generator through these registers; that it does both is all the
// design description says about this block. The bus is this design's own: a
// simple synchronous register port in the 200 MHz clock domain, with the ISA
// bus cycle converted to it elsewhere on the card. A write (wr high for one
// cycle) takes effect on that clock edge; a read (rd high for one cycle)
// returns rdata on the next edge. Register map: see timer_pkg.
//   CTRL      [0] event timers enabled (reset 1), [1] write 1 to arm the gate
//   STATUS    [NUNITS-1:0] event valid, write 1 to clear; [8] armed; [9] firing
//   RG_COARSE, RG_FINE, RG_WIDTH  range gate epoch and length (RG_WIDTH reset 1)
//   COUNTER   live coarse count
//   ET_BASE + 8i / + 8i + 4       coarse count / fine code of timer unit i
// Unused addresses read as 0.
module host_regs
  import timer_pkg::*;
#(
  parameter int unsigned NUNITS  = timer_pkg::ET_UNITS,
  parameter int unsigned CW      = timer_pkg::COARSE_W,
  parameter int unsigned FW      = 5,
  parameter int unsigned SW      = 4,
  parameter int unsigned WW      = timer_pkg::RG_WW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host bus
  input  logic [BUS_AW-1:0]         addr,
  input  logic                      wr,
  input  logic [BUS_DW-1:0]               wdata,
  input  logic                      rd,
  output logic [BUS_DW-1:0]               rdata,
  // event timer units
  output logic                      et_enable,
  output logic [NUNITS-1:0]         et_clear,
  input  logic [NUNITS-1:0]         et_valid,
  input  logic [NUNITS-1:0][CW-1:0] et_coarse,
  input  logic [NUNITS-1:0][FW-1:0] et_fine,
  // range gate generator
  output logic                      rg_arm,
  output logic [CW-1:0]             rg_coarse,
  output logic [SW-1:0]             rg_fine,
  output logic [WW-1:0]             rg_width,
  input  logic                      rg_armed,
  input  logic                      rg_firing,
  // coarse counter
  input  logic [CW-1:0]             count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      et_enable <= 1'b1;
      et_clear  <= '0;
      rg_arm    <= 1'b0;
      rg_coarse <= '0;
      rg_fine   <= '0;
      rg_width  <= WW'(1);
    end else begin
      et_clear <= '0;
      rg_arm   <= 1'b0;
      if (wr) begin
        case (addr)
          REG_CTRL: begin
            et_enable <= wdata[0];
            rg_arm    <= wdata[1];
          end
          REG_STATUS:    et_clear  <= wdata[NUNITS-1:0];
          REG_RG_COARSE: rg_coarse <= CW'(wdata);
          REG_RG_FINE:   rg_fine   <= SW'(wdata);
          REG_RG_WIDTH:  rg_width  <= WW'(wdata);
          default: ;
        endcase
      end
    end
  end

  logic [BUS_DW-1:0] rmux;
  always_comb begin
    rmux = '0;
    case (addr)
      REG_CTRL:      rmux[0] = et_enable;
      REG_STATUS: begin
        rmux[NUNITS-1:0] = et_valid;
        rmux[8]          = rg_armed;
        rmux[9]          = rg_firing;
      end
      REG_RG_COARSE: rmux = BUS_DW'(rg_coarse);
      REG_RG_FINE:   rmux = BUS_DW'(rg_fine);
      REG_RG_WIDTH:  rmux = BUS_DW'(rg_width);
      REG_COUNTER:   rmux = BUS_DW'(count);
      default: begin
        for (int i = 0; i < NUNITS; i++) begin
          if (addr == BUS_AW'(int'(REG_ET_BASE) + 8 * i))     rmux = BUS_DW'(et_coarse[i]);
          if (addr == BUS_AW'(int'(REG_ET_BASE) + 8 * i + 4)) rmux = BUS_DW'(et_fine[i]);
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (rd) rdata <= rmux;
  end

endmodule
