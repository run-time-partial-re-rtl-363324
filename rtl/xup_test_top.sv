// xup_test_top: board test system for the PRMU. A fixed part holds the PRMU
// with its block RAM repository, a stimuli generator, a re-configuration
// initiator standing in for the processor's arbiter, and a multiplexer that
// puts either the stimuli or the result on the four LEDs. A re-configurable
// slot holds one of two test modules: prm_logic (four logic functions of the
// stimuli) or prm_counter (4-bit counter stepped by a push button).
//
// Push buttons (debounced levels, active high): btn_count steps the counter
// module, btn_next steps the stimuli, btn_rm1 / btn_rm2 load module 1 / 2
// by re-configuring the slot from bitstream 1 at BS1_ADDR or bitstream 2 at
// BS2_ADDR in the block RAM. dip_show_result selects result (1) or stimuli
// (0) on leds. reconfig_busy is high from a button press until the PRMU
// reports end_op.
//
// In the device the slot's contents are whatever configuration was written
// through the ICAP last; no logic chooses them. Here both modules are built
// and `slot_module` (0 = module 1, 1 = module 2) says which one the
// configuration memory holds: it is driven from outside, e.g. by a model of
// the ICAP and configuration memory. The bus macros that anchor the signals
// crossing the slot boundary are vendor routing macros with no logic and
// appear here as plain wires.
// The block RAM is filled through the load port (load_en, load_addr,
// load_data), standing for its initial memory image. The off-chip repository
// of the PRMU is not used in this test system: its bus port is tied idle.
// The partition into components follows the test design; the button and
// port assignments, the addresses and the slot_module input are this
// design's choices. Synchronous active-high reset.
// The PRMU outputs that this system does not use (abort status, bus master
// request) are left open.
module xup_test_top #(
  parameter int unsigned      BRAM_AW  = prmu_pkg::BRAM_AW,
  parameter logic [23:0]      BS1_ADDR = 24'h00_0000,
  parameter logic [23:0]      BS2_ADDR = 24'h00_2000
) (
  input  logic               clk,
  input  logic               rst,
  // board controls
  input  logic               btn_count,
  input  logic               btn_next,
  input  logic               btn_rm1,
  input  logic               btn_rm2,
  input  logic               dip_show_result,
  output logic [3:0]         leds,
  output logic               reconfig_busy,
  // contents of the re-configurable slot
  input  logic               slot_module,
  // block RAM initialisation
  input  logic               load_en,
  input  logic [BRAM_AW-1:0] load_addr,
  input  logic [31:0]        load_data,
  // ICAP pins
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [7:0]         icap_i,
  input  logic               icap_busy,
  input  logic [7:0]         icap_o
);
  logic        start_op, set, end_op;
  logic [23:0] mc_address;
  logic [3:0]  stimuli, result, result_logic, result_count;

  // ---------------- fixed part ----------------
  stimuli_gen u_stim (.clk, .rst, .next_vector(btn_next), .stimuli);

  reconfig_initiator #(.ADDR_W(24), .BS1_ADDR(BS1_ADDR), .BS2_ADDR(BS2_ADDR)) u_init (
    .clk, .rst, .btn_rm1, .btn_rm2, .start_op, .set, .mc_address, .end_op, .busy(reconfig_busy)
  );

  led_mux #(.W(4)) u_mux (.clk, .rst, .show_result(dip_show_result), .stimuli, .result, .leds);

  prmu_top #(.BRAM_AW(BRAM_AW)) u_prmu (
    .clk, .rst,
    .start_op, .set, .mc_address, .end_op,
    .abort_req    (1'b0),
    .aborted      (),
    .status       (),
    .status_valid (),
    .load_en, .load_addr, .load_data,
    .m_req        (),
    .m_addr       (),
    .m_len        (),
    .m_gnt        (1'b0),
    .m_rdata      (64'h0),
    .m_rvalid     (1'b0),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy, .icap_o
  );

  // ---------------- re-configurable slot ----------------
  prm_logic   u_prm1 (.stimuli, .result(result_logic));
  prm_counter u_prm2 (.clk, .rst, .count_en(btn_count), .result(result_count));

  assign result = slot_module ? result_count : result_logic;

endmodule
