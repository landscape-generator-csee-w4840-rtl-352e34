// trig_rom: 180-entry sine or cosine lookup ROM with one clock of read
// latency.
//
// Address a holds sin(a degrees) or cos(a degrees), a = 0..179, in signed
// fixed point with 18 fraction bits in a 20-bit word (values 0.5 and 1.0
// are 0x20000 and 0x40000). Angles 180..359 are not stored: the user reads
// address (angle - 180) and negates the result. The table contents are
// computed at elaboration from $sin/$cos and truncated toward zero after
// scaling by 2^18, which is how the tables are defined; a FPGA build would
// hold them in block ROM. COSINE selects which of the two tables this
// instance is.
//
// Interface: addr (8 bits) is sampled on the rising edge of clk and q
// shows the entry on the next cycle. Addresses above DEPTH-1 read 0.
module trig_rom
  import lg_pkg::*;
#(
  parameter bit COSINE = 1'b0,
  parameter int DEPTH  = 180
) (
  input  logic        clk,
  input  logic [7:0]  addr,
  output trig_t       q
);

  typedef trig_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    rad;
    for (int i = 0; i < DEPTH; i++) begin
      rad = real'(i) * 3.14159265358979323846 / 180.0;
      if (COSINE) t[i] = TRIG_W'($rtoi($cos(rad) * real'(1 << FRAC_W)));
      else        t[i] = TRIG_W'($rtoi($sin(rad) * real'(1 << FRAC_W)));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    if (int'(addr) < DEPTH) q <= TABLE[addr];
    else                    q <= '0;
  end

endmodule
