// ecc_soc: a MIPS-based soft core coupled with a variable word size
// accelerator for reduction modulo an irreducible polynomial over GF(2^m).
//
// The accelerator's word size W is a synthesis parameter, meant to be tuned
// to the polynomial f(x) = x^M + x^A + x^B + x^C + 1 (a trinomial uses
// B = C = 0). The defaults are the 294-bit configuration for
// f(x) = x^283 + x^12 + x^7 + x^5 + 1.
//
// Blocks: main core (mips_core), accelerator (ecc_accel), instruction memory
// (imem) and one data memory (dmem) whose width is
// WD = max(2^ceil(log2 W), 32) bits. An accelerator load/store moves the low
// W bits of one WD-bit line in one cycle; its effective address, computed by
// the main core, must be a multiple of WD/8 bytes (the low bits are ignored
// and an assertion flags a misaligned access). EST writes the
// ceil(W/8) low bytes of the line, the bits above W within them as zero; the
// rest of the line is untouched. Main-core accesses select a 32-bit lane of
// the line with the lane multiplexers here.
// Addresses with bit 31 set are IO: a main-core load there reads the 32-bit
// input 'io_in', and a main-core store there writes the bytes it enables
// into the output register 'io_out', with 'io_out_valid' high for the one
// cycle after the store's Ma stage. Accelerator stores to IO are ignored.
// The program is loaded through 'prog_we'/'prog_addr'/'prog_wdata' (word
// address) while 'rst_n' is low; execution starts at address 0.
// The memory sizes, the IO mapping and the program load port are this
// design's choices.
module ecc_soc
  import ecc_pkg::*;
#(
  parameter int unsigned W          = 294,
  parameter int unsigned M          = 283,
  parameter int unsigned A          = 12,
  parameter int unsigned B          = 7,
  parameter int unsigned C          = 5,
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_BYTES = 16384
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [31:0]                   io_in,
  output logic [31:0]                   io_out,
  output logic                          io_out_valid,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [31:0]                   prog_wdata
);
  localparam int unsigned WD    = mem_width(W);
  localparam int unsigned LB    = $clog2(WD / 8);       // byte-offset bits of a line
  localparam int unsigned LINES = DMEM_BYTES / (WD / 8);
  localparam int unsigned LA    = $clog2(LINES);
  localparam int unsigned NLANE = WD / 32;
  localparam int unsigned WBYTES = (W + 7) / 8;

  // main core
  logic        i_en, d_re, d_we, ecc_hazard, id_stall;
  logic [31:0] i_addr, i_rdata, d_raddr, d_rdata, d_waddr, d_wdata;
  logic [3:0]  d_be;
  mem_size_e   d_size, d_rsize;

  mips_core u_core (
    .clk, .rst_n, .i_en, .i_addr, .i_rdata,
    .d_re, .d_raddr, .d_rsize, .d_rdata, .d_we, .d_waddr, .d_wdata, .d_be, .d_size,
    .ecc_hazard, .id_stall
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .rst(!rst_n), .en(i_en), .addr(i_addr[2 +: $clog2(IMEM_WORDS)]),
    .rdata(i_rdata), .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata)
  );

  // accelerator
  logic [W-1:0]  ecc_st;
  logic [WD-1:0] line_rd;

  ecc_accel #(.W(W), .M(M), .A(A), .B(B), .C(C)) u_ecc (
    .clk, .rst_n, .ir(i_rdata), .id_stall, .ecc_hazard,
    .ld_line(line_rd[W-1:0]), .st_data(ecc_st)
  );

  // data memory and the lane multiplexers between it and the main core
  logic              m_re, m_we;
  logic [WD/8-1:0]   m_be;
  logic [WD-1:0]     m_wdata;
  logic [LB-1:2]     rd_lane_q;
  logic              rd_io_q;
  logic [NLANE-1:0][31:0] line_lanes;

  assign m_re = d_re && !d_raddr[31];
  assign m_we = d_we && !d_waddr[31];

  always_comb begin
    m_be    = '0;
    m_wdata = '0;
    if (d_size == SZ_LINE) begin
      for (int i = 0; i < WBYTES; i++) m_be[i] = 1'b1;
      m_wdata[W-1:0] = ecc_st;
    end else begin
      m_be[4*d_waddr[LB-1:2] +: 4] = d_be;
      m_wdata = {NLANE{d_wdata}};
    end
  end

  dmem #(.WD(WD), .LINES(LINES)) u_dmem (
    .clk, .re(m_re), .raddr(d_raddr[LB +: LA]), .rdata(line_rd),
    .we(m_we), .waddr(d_waddr[LB +: LA]), .be(m_be), .wdata(m_wdata)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_lane_q <= '0;
      rd_io_q   <= 1'b0;
    end else if (d_re) begin
      rd_lane_q <= d_raddr[LB-1:2];
      rd_io_q   <= d_raddr[31];
    end

  // IO output register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      io_out       <= '0;
      io_out_valid <= 1'b0;
    end else begin
      io_out_valid <= d_we && d_waddr[31] && d_size != SZ_LINE;
      if (d_we && d_waddr[31] && d_size != SZ_LINE)
        for (int i = 0; i < 4; i++)
          if (d_be[i]) io_out[8*i +: 8] <= d_wdata[8*i +: 8];
    end

  assign line_lanes = line_rd;
  assign d_rdata    = rd_io_q ? io_in : line_lanes[rd_lane_q];

  // accelerator loads and stores must be aligned to a whole line
  a_line_aligned_rd: assert property (@(posedge clk) disable iff (!rst_n)
    (d_re && d_rsize == SZ_LINE) |-> d_raddr[LB-1:0] == '0);
  a_line_aligned_wr: assert property (@(posedge clk) disable iff (!rst_n)
    (d_we && d_size == SZ_LINE) |-> d_waddr[LB-1:0] == '0);
endmodule
