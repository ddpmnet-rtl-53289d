// ddpmnet_top: the DDPMnet core, a pulse-density DNN accelerator whose MAC
// units are counters.
//
// Data path: the host fills the three input feature banks, the displacement
// list and the program memory, then pulses start. The controller steps
// through the program; each word drives one instruction into every column of
// the R x C MAC array for dur+1 cycles and may reload the modulators of one
// or both ports from the two active input banks (walking the read pointers
// by the displacement list) and rotate the banks. The R x M DDPM modulators
// turn the loaded features into pulse streams shared by each MAC row; the
// MAC units count the selected stream up or down for as many cycles as the
// weight magnitude, apply ReLU and latch the result, which the host reads
// through rd_row/rd_col (combinational, memory-mapped readout).
//
// The block structure (input memory with 3 banks of which 2 are active,
// R x M modulators, R x C MAC array, program memory, program counter and
// controller) follows the source design. Host port formats, the
// program-word control fields and the timing are this implementation's.
//
// Timing: host writes are synchronous; start is sampled at a rising edge
// while idle; busy is high while the program runs; done pulses for one
// cycle after the halting word's last cycle.
module ddpmnet_top
  import ddpm_pkg::*;
#(
  parameter int unsigned R = ROWS,
  parameter int unsigned C = COLS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // run control
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // program memory write port
  input  logic                     pm_we,
  input  logic [PM_AW-1:0]         pm_waddr,
  input  pm_ctrl_t                 pm_wctrl,
  input  mac_op_t [C-1:0]          pm_wops,
  // input feature memory write port
  input  logic                     im_we,
  input  logic [1:0]               im_wbank,
  input  logic [BANK_AW-1:0]       im_waddr,
  input  logic [$clog2(R)-1:0]     im_wlane,
  input  logic [FW-1:0]            im_wdata,
  output logic [1:0]               im_idle_bank,
  // displacement list write port
  input  logic                     dm_we,
  input  logic [DM_AW-1:0]         dm_waddr,
  input  disp_t                    dm_wdata,
  // MAC result readout
  input  logic [$clog2(R)-1:0]     rd_row,
  input  logic [$clog2(C)-1:0]     rd_col,
  output logic signed [CNT_W-1:0]  rd_data
);

  logic [PM_AW-1:0]                pm_raddr;
  pm_ctrl_t                        pm_ctrl;
  mac_op_t [C-1:0]                 pm_ops;
  logic [DM_AW-1:0]                dm_raddr;
  disp_t                           dm_d0, dm_d1;
  logic                            mem_rot;
  logic [MODS-1:0][BANK_AW-1:0]    mem_raddr;
  logic [MODS-1:0][R-1:0][FW-1:0]  feat;
  logic [MODS-1:0]                 mod_load;
  logic [R-1:0][MODS-1:0]          pulse;
  mac_op_t [C-1:0]                 mac_op;

  program_memory #(.C(C)) u_pm (
    .clk     (clk),
    .wr_en   (pm_we),
    .wr_addr (pm_waddr),
    .wr_ctrl (pm_wctrl),
    .wr_ops  (pm_wops),
    .rd_addr (pm_raddr),
    .rd_ctrl (pm_ctrl),
    .rd_ops  (pm_ops)
  );

  displacement_memory u_dm (
    .clk      (clk),
    .wr_en    (dm_we),
    .wr_addr  (dm_waddr),
    .wr_data  (dm_wdata),
    .rd_addr  (dm_raddr),
    .rd_data0 (dm_d0),
    .rd_data1 (dm_d1)
  );

  ddpm_controller #(.C(C)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .busy      (busy),
    .done      (done),
    .pm_raddr  (pm_raddr),
    .pm_ctrl   (pm_ctrl),
    .pm_ops    (pm_ops),
    .dm_raddr  (dm_raddr),
    .dm_d0     (dm_d0),
    .dm_d1     (dm_d1),
    .mem_rot   (mem_rot),
    .mem_raddr (mem_raddr),
    .mod_load  (mod_load),
    .mac_op    (mac_op)
  );

  input_feature_memory #(.R(R)) u_im (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (im_we),
    .wr_bank   (im_wbank),
    .wr_addr   (im_waddr),
    .wr_lane   (im_wlane),
    .wr_data   (im_wdata),
    .rot       (mem_rot),
    .idle_bank (im_idle_bank),
    .rd_addr   (mem_raddr),
    .rd_data   (feat)
  );

  ddpm_modulator_array #(.R(R)) u_mods (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (mod_load),
    .feat  (feat),
    .pulse (pulse)
  );

  ddpm_mac_array #(.R(R), .C(C)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .pulse   (pulse),
    .op      (mac_op),
    .rd_row  (rd_row),
    .rd_col  (rd_col),
    .rd_data (rd_data)
  );

endmodule
