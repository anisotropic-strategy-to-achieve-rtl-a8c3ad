// line_buffer: two lines of CFA samples in front of the register bank.
//
// The buffer behaves as two cascaded delay lines of WIDTH samples each. On every
// advance (shift_en) the sample at the circular pointer is read, the incoming pixel
// is written in its place in line 1 and the old line-1 sample moves to line 2. So
// with the pixel of row r+1 at column x arriving, mid_out is the pixel of row r and
// top_out the pixel of row r-1 at the same column. Reading is combinational and
// writing happens at the clock edge (read before write at one address).
//
// The document shows a line buffer feeding the register bank and says the processor
// needs no extra line memory for its wider horizontal support; the organisation as
// one WIDTH-deep array of two-sample words, the circular pointer and the
// combinational read are this design's choices. Storage is not reset: the controller
// never lets the interpolators use a sample that was not written in the current frame.
module line_buffer #(
  parameter int unsigned DW    = 8,    // bits per CFA sample
  parameter int unsigned WIDTH = 640   // samples per image line
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_en,  // advance by one pixel
  input  logic [DW-1:0] din,       // pixel of row r+1
  output logic [DW-1:0] mid_out,   // pixel of row r, same column
  output logic [DW-1:0] top_out    // pixel of row r-1, same column
);
  localparam int unsigned AW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [2*DW-1:0] mem [WIDTH];
  logic [AW-1:0]   ptr;
  logic [2*DW-1:0] rd;

  assign rd      = mem[ptr];
  assign mid_out = rd[DW-1:0];
  assign top_out = rd[2*DW-1:DW];

  always_ff @(posedge clk) begin
    if (shift_en) mem[ptr] <= {rd[DW-1:0], din};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              ptr <= '0;
    else if (shift_en) begin
      if (ptr == AW'(WIDTH - 1)) ptr <= '0;
      else                       ptr <= ptr + 1'b1;
    end
  end
endmodule
