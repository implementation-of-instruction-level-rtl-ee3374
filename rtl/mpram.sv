// mpram: CRCW multiport static RAM.
//
// A memory whose PORTS ports access the cell array simultaneously and
// independently, as the building block of a PRAM-style shared memory. Each
// port has its own address decoders (the address is split into a row and a
// column half, the cell array being square), data lines, chip select and
// write line; the cell array is shared. A cell is selected by a port when
// both the port's row and column select lines for it are active. Concurrent
// writes to one word are resolved inside the cell:
//   PRIORITY = 0: CRCW Common - the data of all writing ports is ORed
//                 (correct when they all write the same value);
//   PRIORITY = 1: CRCW Priority - the port with the lowest index wins.
// Reads are concurrent and see the contents before this cycle's writes.
//
// Interface: clk; per port cs (chip select), we (1 = write), addr, din, dout.
// Timing: dout is combinational from addr (read during the cycle); writes
// take effect at the rising clock edge.
//
// Follows the architecture description: per-port decoders and lines, shared cell array,
// the two write-resolution rules and their cell structures (crcw_common_logic,
// crcw_priority_logic), per-port outputs; the default size is the reference
// example chip: 16 ports, 16 kbit x 1. This design's own choices: the cell
// logic is instantiated once per port for the word that port addresses
// (every other word sees no select line and keeps its value, so this is the
// same function as one copy per cell); storage is a clocked array instead of
// SR latches; write enable is active high.
module mpram #(
  parameter int unsigned PORTS    = 16,
  parameter int unsigned WORDS    = 16384,
  parameter int unsigned WIDTH    = 1,
  parameter bit          PRIORITY = 1'b0,
  localparam int unsigned AW      = $clog2(WORDS)
) (
  input  logic                         clk,
  input  logic [PORTS-1:0]             cs,
  input  logic [PORTS-1:0]             we,
  input  logic [PORTS-1:0][AW-1:0]     addr,
  input  logic [PORTS-1:0][WIDTH-1:0]  din,
  output logic [PORTS-1:0][WIDTH-1:0]  dout
);

  localparam int unsigned COLW = AW / 2;
  localparam int unsigned ROWW = AW - COLW;

  logic [WIDTH-1:0] mem [WORDS];

  logic [PORTS-1:0]            wri;
  logic [PORTS-1:0][WIDTH-1:0] inp;

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    logic [PORTS-1:0]            s;
    logic [PORTS-1:0][WIDTH-1:0] o;
    logic                        any_sel;
    logic [ROWW-1:0]             row;
    logic [COLW-1:0]             col;

    assign row = addr[p][AW-1:COLW];
    assign col = addr[p][COLW-1:0];

    // Row select AND column select of every port for the word port p addresses
    always_comb begin
      for (int k = 0; k < PORTS; k++)
        s[k] = cs[k] && (addr[k][AW-1:COLW] == row) && (addr[k][COLW-1:0] == col);
    end

    if (PRIORITY) begin : g_prio
      logic [PORTS-1:0] win;
      crcw_priority_logic #(.N(PORTS), .W(WIDTH)) u_cell (
        .s(s), .w(we), .i(din), .q(mem[addr[p]]),
        .wri(wri[p]), .inp(inp[p]), .sel(any_sel), .o(o), .win(win)
      );
    end else begin : g_common
      crcw_common_logic #(.N(PORTS), .W(WIDTH)) u_cell (
        .s(s), .w(we), .i(din), .q(mem[addr[p]]),
        .wri(wri[p]), .inp(inp[p]), .sel(any_sel), .o(o)
      );
    end

    assign dout[p] = o[p];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < PORTS; p++)
      if (wri[p]) mem[addr[p]] <= inp[p];
  end

endmodule
