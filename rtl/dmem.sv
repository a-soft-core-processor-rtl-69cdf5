// dmem: the shared data memory, an on-chip block RAM whose data width WD is
// max(2^ceil(log2 W), 32) for the accelerator word size W, as the original design
// prescribes: one accelerator load or store moves a whole line in one cycle.
// The main core reaches 32-bit lanes of a line through byte enables and the
// lane multiplexers of the top level.
// Ports: a read port addressed from the Ex stage ('re', 'raddr'; data valid
// on 'rdata' in the following cycle, i.e. during Ma) and a write port used
// by the Ma stage ('we', 'waddr', byte enables 'be', 'wdata'). When a line
// is written and read in the same cycle the read returns the new bytes
// (write-first), so a store in Ma and a load in Ex to the same line need no
// extra interlock. LINES (the depth) and the port arrangement are this
// design's choices.
module dmem #(
  parameter int unsigned WD    = 512,
  parameter int unsigned LINES = 256
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(LINES)-1:0] raddr,
  output logic [WD-1:0]            rdata,
  input  logic                     we,
  input  logic [$clog2(LINES)-1:0] waddr,
  input  logic [WD/8-1:0]          be,
  input  logic [WD-1:0]            wdata
);
  logic [WD-1:0] mem [LINES];
  logic [WD-1:0] merged;

  // old line with the enabled bytes replaced, for the write-first read
  always_comb begin
    merged = mem[waddr];
    for (int i = 0; i < WD/8; i++)
      if (be[i]) merged[8*i +: 8] = wdata[8*i +: 8];
  end

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < WD/8; i++)
        if (be[i]) mem[waddr][8*i +: 8] <= wdata[8*i +: 8];
    if (re)
      rdata <= (we && raddr == waddr) ? merged : mem[raddr];
  end
endmodule
