// poetic_top: the POEtic tissue, a system-on-chip for evolvable hardware.
//
// Environmental subsystem: the processor's bus (APB form of AMBA) reaches
// the system interface to the array, a 16 x 16 Booth multiplier and two
// 16-bit timers; the pseudorandom number generator sits beside the
// processor. Organic subsystem: a ROWS x COLS array of molecules whose
// configuration bits and flip-flop values are all mapped into the
// processor's address space, so a program can write a candidate circuit
// (three bus writes per molecule), run it and read its state back.
//
// The processor itself is not part of this RTL: its bus master port
// (cpu_req/cpu_rsp) and the generator's port are brought out, as are the
// array's border lines and its signals towards the routing plane, which is
// also not part of this RTL.
//
// Address map: 0x0000_0000 array (16 bytes per molecule), 0x0001_0000
// multiplier, 0x0001_0100 timer 0, 0x0001_0200 timer 1.
module poetic_top
  import poetic_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 20,
  localparam int unsigned N   = ROWS * COLS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor bus master
  input  apb_req_t              cpu_req,
  output apb_rsp_t              cpu_rsp,
  // pseudorandom number generator, used by the processor
  input  logic                  prng_next,
  input  logic                  prng_seed_we,
  input  logic [31:0]           prng_seed,
  output logic [31:0]           prng_value,
  // timer interrupts
  output logic [1:0]            timer_irq,
  // array borders
  input  logic [COLS-1:0][1:0]  north_in,
  output logic [COLS-1:0][1:0]  north_out,
  input  logic [COLS-1:0][1:0]  south_in,
  output logic [COLS-1:0][1:0]  south_out,
  input  logic [ROWS-1:0][1:0]  east_in,
  output logic [ROWS-1:0][1:0]  east_out,
  input  logic [ROWS-1:0][1:0]  west_in,
  output logic [ROWS-1:0][1:0]  west_out,
  input  logic [COLS-1:0]       carry_in_south,
  output logic [COLS-1:0]       carry_out_north,
  // routing plane
  input  logic [N-1:0]          route_in,
  output logic [N-1:0]          route_out,
  output logic [N-1:0]          trigger_out,
  output logic [N-1:0]          mol_out
);

  localparam int unsigned MW = (N > 1) ? $clog2(N) : 1;

  apb_req_t [3:0] s_req;
  apb_rsp_t [3:0] s_rsp;

  logic          a_wr_en;
  logic [MW-1:0] a_wr_mol, a_rd_mol;
  logic [1:0]    a_wr_word, a_rd_word;
  logic [31:0]   a_wr_data, a_rd_data;

  apb_decoder #(.NS(4)) u_bus (
    .m_req (cpu_req),
    .m_rsp (cpu_rsp),
    .s_req,
    .s_rsp
  );

  system_interface #(.N_MOL(N)) u_sif (
    .req     (s_req[0]),
    .rsp     (s_rsp[0]),
    .wr_en   (a_wr_en),
    .wr_mol  (a_wr_mol),
    .wr_word (a_wr_word),
    .wr_data (a_wr_data),
    .rd_mol  (a_rd_mol),
    .rd_word (a_rd_word),
    .rd_data (a_rd_data)
  );

  booth_mul16 u_mul (.clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]));
  timer16     u_tim0 (.clk, .rst_n, .req(s_req[2]), .rsp(s_rsp[2]), .irq(timer_irq[0]));
  timer16     u_tim1 (.clk, .rst_n, .req(s_req[3]), .rsp(s_rsp[3]), .irq(timer_irq[1]));

  prng u_prng (
    .clk, .rst_n,
    .next    (prng_next),
    .seed_we (prng_seed_we),
    .seed    (prng_seed),
    .value   (prng_value)
  );

  organic_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n,
    .wr_en   (a_wr_en),
    .wr_mol  (a_wr_mol),
    .wr_word (a_wr_word),
    .wr_data (a_wr_data),
    .rd_mol  (a_rd_mol),
    .rd_word (a_rd_word),
    .rd_data (a_rd_data),
    .north_in, .north_out, .south_in, .south_out,
    .east_in, .east_out, .west_in, .west_out,
    .carry_in_south, .carry_out_north,
    .route_in, .route_out, .trigger_out, .mol_out
  );

endmodule
