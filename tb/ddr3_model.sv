// ddr3_model: behavioural model of the DDR3 PHY and SO-DIMM behind the
// memory controller (not part of the design; stands in for the vendor PHY
// and the DRAM). Executes ACT/RD/WR/PRE commands per bank on a sparse
// cacheline store and returns read data RL clocks after the RD command
// (ddr_rvalid/ddr_rdata, in command order). It checks the DDR3 rules the
// controller must keep, counting each breach in `violations`: ACT only to a
// precharged bank after tRP, RD/WR only to the open row after tRCD, PRE only
// after tRAS, tRTP (after RD) and tWR (after WR). Lines never written read
// as the initial image of the protected region, so the integrity tree of a
// fresh memory verifies. `peek`/`poke` give the testbench direct access.
module ddr3_model
  import nvmm_pkg::*;
  import sit_ref_pkg::*;
#(
  parameter int    RL    = 6,
  parameter int    T_RCD = 3,
  parameter int    T_RP  = 3,
  parameter int    T_RAS = 7,
  parameter int    T_RTP = 2,
  parameter int    T_WR  = 3,
  parameter addr_t PROT_BASE = 34'h0_C000_0000,
  parameter int    N_ROOTS   = 384
) (
  input  logic         clk,
  input  logic [127:0] key_e,
  input  logic [63:0]  key_p,
  input  logic [127:0] key_m,
  input  logic         ddr_cmd_valid,
  input  ddr_cmd_t     ddr_cmd,
  output logic         ddr_rvalid,
  output line_t        ddr_rdata
);
  line_t mem [addr_t];
  int    violations = 0;
  int    n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0;
  longint cyc = 0;
  bit     open [BANKS];
  logic [ROW_W-1:0] orow [BANKS];
  longint t_act [BANKS], t_pre [BANKS], t_rd [BANKS], t_wr [BANKS];
  bit     pv [RL];
  line_t  pd [RL];

  initial for (int b = 0; b < BANKS; b++) begin
    open[b] = 0; orow[b] = '0; t_act[b] = -100; t_pre[b] = -100; t_rd[b] = -100; t_wr[b] = -100;
  end
  initial for (int i = 0; i < RL; i++) begin pv[i] = 0; pd[i] = '0; end

  function automatic addr_t cmd_addr(ddr_cmd_t c);
    return DRAM_BASE + {2'b00, c.bank, c.row, c.col, 6'b0};
  endfunction

  function automatic line_t peek(addr_t a);
    if (!mem.exists(a)) return ref_init_line(key_e, key_p, key_m, PROT_BASE, N_ROOTS, a);
    return mem[a];
  endfunction

  function automatic void poke(addr_t a, line_t v);
    mem[a] = v;
  endfunction

  function automatic void viol(string s);
    violations++;
    $display("DDR3 VIOLATION at cycle %0d: %s", cyc, s);
  endfunction

  assign ddr_rvalid = pv[RL-1];
  assign ddr_rdata  = pd[RL-1];

  always @(posedge clk) begin
    for (int i = RL - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= 1'b0;
    if (ddr_cmd_valid) begin
      int b;
      b = int'(ddr_cmd.bank);
      case (ddr_cmd.op)
        DDR_ACT: begin
          n_act++;
          if (open[b]) viol($sformatf("ACT to open bank %0d", b));
          if (cyc - t_pre[b] < T_RP) viol($sformatf("tRP bank %0d", b));
          open[b] = 1; orow[b] = ddr_cmd.row; t_act[b] = cyc;
        end
        DDR_RD, DDR_WR: begin
          if (!open[b] || orow[b] != ddr_cmd.row) viol($sformatf("column command to closed row, bank %0d", b));
          if (cyc - t_act[b] < T_RCD) viol($sformatf("tRCD bank %0d", b));
          if (ddr_cmd.op == DDR_RD) begin
            n_rd++; t_rd[b] = cyc;
            pv[0] <= 1'b1; pd[0] <= peek(cmd_addr(ddr_cmd));
          end else begin
            n_wr++; t_wr[b] = cyc;
            mem[cmd_addr(ddr_cmd)] = ddr_cmd.wdata;
          end
        end
        DDR_PRE: begin
          n_pre++;
          if (!open[b]) viol($sformatf("PRE to closed bank %0d", b));
          if (cyc - t_act[b] < T_RAS) viol($sformatf("tRAS bank %0d", b));
          if (cyc - t_rd[b] < T_RTP) viol($sformatf("tRTP bank %0d", b));
          if (cyc - t_wr[b] < T_WR) viol($sformatf("tWR bank %0d", b));
          open[b] = 0; t_pre[b] = cyc;
        end
        default: ;
      endcase
    end
    cyc++;
  end
endmodule
