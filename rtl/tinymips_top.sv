// tinymips_top: the TinyMIPS processor: controller, datapath and RAM.
//
// The controller FSM reads the instruction's op/funct/rt fields and the eq/neg branch
// conditions from the datapath and drives the datapath's control points; the datapath
// addresses the RAM over the A bus and exchanges words with it over the D bus. After
// reset the processor fetches from RESET_PC and runs the program in RAM: three cycles
// per addu, subu, lw and sw, two per j, jr, beq and bltz.
//
// Ports: clk and active-low asynchronous rst_n in; the PC, the IR, the controller state
// and a one-cycle done pulse at the end of each instruction out, for observation.
// The RAM holds both program and data; load it before releasing reset.
//
// The controller/datapath/memory split and the single RAM on the two buses follow the
// original organisation. The observation ports, the reset, and the RAM size (2^30 bytes
// instead of the architected 2^32, the largest the simulator accepts) are this
// implementation's choices.
module tinymips_top
  import tinymips_pkg::*;
#(
  parameter int    RAM_AW   = 30,   // byte-address bits decoded by the RAM
  parameter word_t RESET_PC = '0    // first instruction address
) (
  input  logic   clk,
  input  logic   rst_n,
  output word_t  pc,
  output word_t  ir,
  output state_t state,
  output logic   done
);

  ctrl_t      ctrl;
  word_t      abus, dbus, mem_rdata;
  logic [5:0] op, funct;
  reg_idx_t   rt;
  logic       eq, neg;

  tinymips_controller u_ctrl (
    .clk, .rst_n,
    .op, .funct, .rt, .eq, .neg,
    .ctrl, .state, .done
  );

  tinymips_datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk, .rst_n,
    .ctrl, .mem_rdata,
    .abus, .dbus,
    .op, .funct, .rt, .eq, .neg,
    .pc, .ir
  );

  tinymips_ram #(.AW(RAM_AW)) u_ram (
    .clk,
    .addr  (abus),
    .wdata (dbus),
    .wrt   (ctrl.wrt),
    .rdata (mem_rdata)
  );

endmodule
