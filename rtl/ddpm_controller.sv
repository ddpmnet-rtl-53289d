// ddpm_controller: program counter and sequencer of the DDPMnet core.
//
// After start the controller walks the program memory from address 0. The
// word in the instruction register is applied to the MAC columns for dur+1
// cycles; in the last of those cycles the next word is fetched and, at the
// same clock edge that makes it current, its side effects happen:
//   * rot rotates the input banks (the loads of the same word already read
//     the rotated banks);
//   * each set ld[k] moves the read pointer of modulator port k by the next
//     entry of the displacement list and reloads the port's modulators from
//     the bank word at the new pointer (address y*XDIM + x).
// So the first cycle of a word already sees the freshly loaded features at
// modulation position 0, and a weight run in that word counts exactly the
// first dur+1 positions of the new streams. A word with halt set ends the
// run after its last cycle; done pulses for one cycle and the columns get
// NOP until the next start.
//
// The source design names a controller and a program counter that steps
// through the program memory; how the words are sequenced, the hold-time
// field and the pointer arithmetic are this implementation's choices. The
// pointers wrap modulo 64 (x) and 16 (y); the scheduler must keep them
// inside the bank, which an assertion checks. The assertions are disabled
// while rst_n is low, which is why lint sees rst_n used both as an
// asynchronous reset and as a synchronous signal; that is intended.
module ddpm_controller
  import ddpm_pkg::*;
#(
  parameter int unsigned C    = COLS,
  parameter int unsigned M    = MODS,
  parameter int unsigned XD   = XDIM,
  parameter int unsigned BDEP = BANK_DEPTH,
  parameter int unsigned PAW  = PM_AW,
  parameter int unsigned DAW  = DM_AW,
  parameter int unsigned BAW  = $clog2(BDEP)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // program memory read port
  output logic [PAW-1:0]        pm_raddr,
  input  pm_ctrl_t              pm_ctrl,
  input  mac_op_t [C-1:0]       pm_ops,
  // displacement list read port
  output logic [DAW-1:0]        dm_raddr,
  input  disp_t                 dm_d0,
  input  disp_t                 dm_d1,
  // input feature memory and modulators
  output logic                  mem_rot,
  output logic [M-1:0][BAW-1:0] mem_raddr,
  output logic [M-1:0]          mod_load,
  // MAC columns
  output mac_op_t [C-1:0]       mac_op
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t            state_q;
  logic [PAW-1:0]    pc_q;
  logic [DUR_W-1:0]  rem_q;
  logic              halt_q;
  mac_op_t [C-1:0]   ir_ops_q;
  logic [DAW-1:0]    dptr_q, dptr_n;
  ptr_t [M-1:0]      ptr_q, ptr_n;
  logic              fetch;

  always_comb begin
    int unsigned used;
    int unsigned a;
    disp_t       d;

    fetch    = (state_q == S_IDLE) ? start : (rem_q == '0 && !halt_q);
    pm_raddr = (state_q == S_IDLE) ? '0 : pc_q + 1'b1;
    dm_raddr = (state_q == S_IDLE) ? '0 : dptr_q;
    mem_rot  = fetch && pm_ctrl.rot;

    used = 0;
    d    = '0;
    a    = 0;
    for (int k = 0; k < int'(M); k++) begin
      ptr_n[k]    = (state_q == S_IDLE) ? '0 : ptr_q[k];
      mod_load[k] = fetch && pm_ctrl.ld[k];
      if (mod_load[k]) begin
        d = (used == 0) ? dm_d0 : dm_d1;
        ptr_n[k].x = ptr_n[k].x + DX_W'(d.dx);
        ptr_n[k].y = ptr_n[k].y + DY_W'(d.dy);
        used++;
      end
      a = int'(ptr_n[k].y) * XD + int'(ptr_n[k].x);
      mem_raddr[k] = (a < BDEP) ? a[BAW-1:0] : '1;
    end
    dptr_n = dm_raddr + DAW'(used);

    busy   = (state_q == S_RUN);
    mac_op = busy ? ir_ops_q : {C{OP_NOP}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      pc_q     <= '0;
      rem_q    <= '0;
      halt_q   <= 1'b0;
      ir_ops_q <= {C{OP_NOP}};
      dptr_q   <= '0;
      ptr_q    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (fetch) begin
        state_q  <= S_RUN;
        pc_q     <= pm_raddr;
        rem_q    <= pm_ctrl.dur;
        halt_q   <= pm_ctrl.halt;
        ir_ops_q <= pm_ops;
        dptr_q   <= dptr_n;
        ptr_q    <= ptr_n;
      end else if (state_q == S_RUN) begin
        if (rem_q != '0) begin
          rem_q <= rem_q - 1'b1;
        end else begin
          state_q <= S_IDLE;  // halt_q is set here
          done    <= 1'b1;
        end
      end
    end
  end

  // a load must address a word inside the bank
  for (genvar k = 0; k < int'(M); k++) begin : g_chk
    a_load_in_bank : assert property (@(posedge clk) disable iff (!rst_n)
      mod_load[k] |-> int'(mem_raddr[k]) < int'(BDEP));
  end

  // at most two displacement entries can be read per word
  a_two_loads : assert property (@(posedge clk) disable iff (!rst_n)
    fetch |-> $countones(pm_ctrl.ld) <= 2);

endmodule
