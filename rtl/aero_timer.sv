// Exposed hardware timer: a 64-bit (two 32-bit words) free-running counter
// of processor clock cycles, cleared by reset and incremented every cycle.
// At 50 MHz it wraps only after about 11,700 years. The memory-mapped I/O
// decoder makes both halves readable by software.
module aero_timer (
  input  logic        clk,
  input  logic        rst,
  output logic [63:0] count
);

  always_ff @(posedge clk)
    if (rst) count <= '0;
    else     count <= count + 64'd1;

endmodule
