// trisc_top: the TRISC processor with its development-board interface.
//
// TRISC is a 4-bit accumulator computer. Memory is 16 words of 8 bits; an
// instruction word is {opcode, address}. Three buses join the blocks: the
// 4-bit address bus from the program counter, the 8-bit memory data out bus
// MDO from the RAM, and the 8-bit memory data in bus MDI, whose low nibble is
// the accumulator (its high nibble is 0). The RAM address is the PC when C3
// is high and MDO[3:0] (the address field of the fetched instruction) when
// C3 is low. The IR takes MDO[7:4]; the ALU adds the ACC (MDI) and MDO[3:0];
// its result goes to the buffer register BR and from there to the ACC. The
// control unit sequences everything; see controller for the states.
//
// Program-load mode (mode = 1) hands the RAM to the board: the address comes
// from the address generator, the data from data_in, the RAM clock enable
// from the clock_in key strobe and the write enable from the active-low
// rw_n key. Hold start_stop low while loading. In run mode (mode = 0) the
// RAM is enabled by C4 and written under C5 with MDI.
//
// Displays (seven-segment, active low): hex5 = PC, hex4 = RAM address,
// hex3/hex2 = MDO, hex1/hex0 = RAM data input (in run mode MDI, so hex0
// shows the ACC). cled[k] shows control signal Ck; cled[6] is always 0 as
// there is no C6.
//
// Timing: one clock, sys_clock, rising edge; each controller state lasts one
// clock. start_stop is an asynchronous active-low stop/reset: low holds the
// controller in state A and clears the PC, ACC, IR and BR. clock_in must be a
// one-clock strobe synchronous to sys_clock (debouncing and edge detection of
// the key are outside this module). The bus structure, the load/run
// multiplexers and the display assignment follow the original top level;
// the single synchronous clock and the strobe interface are this design's.
//
// Lint note: a linter that treats the control word as one signal reports a
// combinational loop ir_out -> decoder -> ctrl -> ir_out. It is not a real
// loop: the IR's write-through is selected by C7, which depends only on the
// controller state, while the decoder output reaches only C2 (dropped in
// state E on an opcode that halts the machine) and the next state.
module trisc_top
  import trisc_pkg::*;
#(
  parameter bit SEG_ACTIVE_LOW = 1'b1
) (
  input  logic        sys_clock,
  input  logic        start_stop,
  input  logic        mode,
  input  logic        clock_in,
  input  logic        clear_addr_gen_n,
  input  logic        rw_n,
  input  logic [7:0]  data_in,
  output logic [14:0] cled,
  output logic [6:0]  hex5_out,
  output logic [6:0]  hex4_out,
  output logic [6:0]  hex3_out,
  output logic [6:0]  hex2_out,
  output logic [6:0]  hex1_out,
  output logic [6:0]  hex0_out
);
  ctrl_t      ctrl;
  state_e     state;
  logic       halted;
  logic [3:0] addr_bus;   // PC output
  logic [3:0] ram_addr;   // run-mode RAM address (C3 mux)
  logic [3:0] add_in;     // address actually applied to the RAM
  logic [3:0] addr_gen;
  logic [3:0] ir_out;
  logic [3:0] alu_out;
  logic [3:0] br_out;
  logic [3:0] acc;
  logic       alu_ovr;    // flags are produced but not stored: there is no
  logic       alu_cout;   // flag register in this instruction set
  logic [7:0] mdi;
  logic [7:0] mdo;
  logic [7:0] ram_data;
  logic       ram_en;
  logic       ram_we;

  // ---------------------------------------------------------------- buses
  assign mdi      = {4'b0000, acc};
  assign ram_addr = ctrl.c3 ? addr_bus : mdo[3:0];
  assign add_in   = mode ? addr_gen : ram_addr;
  assign ram_en   = mode ? clock_in : ctrl.c4;
  assign ram_data = mode ? data_in  : mdi;
  assign ram_we   = mode ? ~rw_n    : ctrl.c5;

  // ---------------------------------------------------------- load path
  address_generator u_addr_gen (
    .clk    (sys_clock),
    .clear_n(clear_addr_gen_n),
    .step   (clock_in),
    .addr   (addr_gen)
  );

  // ------------------------------------------------------------ datapath
  ram16x8 #(.AW(4), .DW(8)) u_ram (
    .clk (sys_clock),
    .en  (ram_en),
    .we  (ram_we),
    .addr(add_in),
    .data(ram_data),
    .q   (mdo)
  );

  up_counter #(.N(4)) u_pc (
    .clk  (sys_clock),
    .rst_n(start_stop),
    .clear(ctrl.c0),
    .load (ctrl.c1),
    .inc  (ctrl.c2),
    .d    (mdo[3:0]),
    .q    (addr_bus)
  );

  pipo_register #(.N(4)) u_ir (
    .clk  (sys_clock),
    .clr_n(start_stop),
    .load (ctrl.c7),
    .d    (mdo[7:4]),
    .q    (ir_out)
  );

  accumulator u_acc (
    .clk    (sys_clock),
    .rst_n  (start_stop),
    .mdo    (mdo[3:0]),
    .alu    (br_out),
    .sel_alu(ctrl.c10),
    .inc    (ctrl.c9),
    .load   (ctrl.c11),
    .clear  (ctrl.c8),
    .q      (acc)
  );

  pipo_register #(.N(4)) u_br (
    .clk  (sys_clock),
    .clr_n(start_stop),
    .load (ctrl.c14),
    .d    (alu_out),
    .q    (br_out)
  );

  alu u_alu (
    .a   (mdi[3:0]),
    .b   (mdo[3:0]),
    .s0  (ctrl.c12),
    .s1  (ctrl.c13),
    .r   (alu_out),
    .ovr (alu_ovr),
    .cout(alu_cout)
  );

  control_unit u_cu (
    .clk   (sys_clock),
    .rst_n (start_stop),
    .ir    (ir_out),
    .ctrl  (ctrl),
    .state (state),
    .halted(halted)
  );

  // ------------------------------------------------------------ displays
  assign cled = {ctrl.c14, ctrl.c13, ctrl.c12, ctrl.c11, ctrl.c10, ctrl.c9,
                 ctrl.c8, ctrl.c7, 1'b0, ctrl.c5, ctrl.c4, ctrl.c3, ctrl.c2,
                 ctrl.c1, ctrl.c0};

  seven_seg_hex #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_hex5 (.digit(addr_bus),       .seg(hex5_out));
  seven_seg_hex #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_hex4 (.digit(add_in),         .seg(hex4_out));
  seven_seg_hex #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_hex3 (.digit(mdo[7:4]),       .seg(hex3_out));
  seven_seg_hex #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_hex2 (.digit(mdo[3:0]),       .seg(hex2_out));
  seven_seg_hex #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_hex1 (.digit(ram_data[7:4]),  .seg(hex1_out));
  seven_seg_hex #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_hex0 (.digit(ram_data[3:0]),  .seg(hex0_out));
endmodule
