// hmap_avalon_ctrl: memory-mapped slave through which the CPU loads a new
// height map.
//
// Word registers (Avalon word offsets):
//   0  x     grid column of the next height (write)
//   1  y     grid row of the next height (write)
//   2  data  height, 32-bit 18.18 fixed point; writing it also writes the
//            height map RAM at y*32 + x in the same clock
//   3  start reads 1 while the system asks for a new landscape
//   4  done  bit 0 drives gen_done; the CPU writes 1 then 0 when finished
// Other offsets read 0. The 32-bit value is zero-extended by 4 bits to the
// 36-bit RAM word. Reads have one clock of latency (readdata registered).
// The register map, the padding and the done handshake follow the report;
// taking the RAM data straight from writedata is this design's own choice.
module hmap_avalon_ctrl
  import lg_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // Avalon-MM slave
  input  logic                chipselect,
  input  logic                read,
  input  logic                write,
  input  logic [5:0]          address,
  input  logic [31:0]         writedata,
  output logic [31:0]         readdata,
  // to the system controller
  input  logic                gen_start,
  output logic                gen_done,
  // height map RAM write port
  output logic [HMAP_AW-1:0]  hmap_address,
  output logic [FIX_W-1:0]    data,
  output logic                wren
);

  logic [31:0] reg_x, reg_y, reg_data, reg_done;
  logic        wr, rd;

  assign wr = chipselect && write;
  assign rd = chipselect && read;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_x    <= '0;
      reg_y    <= '0;
      reg_data <= '0;
      reg_done <= '0;
      readdata <= '0;
    end else begin
      if (wr) begin
        unique case (address)
          6'd0: reg_x    <= writedata;
          6'd1: reg_y    <= writedata;
          6'd2: reg_data <= writedata;
          6'd4: reg_done <= writedata;
          default: ;
        endcase
      end
      if (rd) begin
        unique case (address)
          6'd0: readdata <= reg_x;
          6'd1: readdata <= reg_y;
          6'd2: readdata <= reg_data;
          6'd3: readdata <= {31'd0, gen_start};
          6'd4: readdata <= reg_done;
          default: readdata <= '0;
        endcase
      end
    end
  end

  assign hmap_address = {reg_y[4:0], reg_x[4:0]};
  assign data         = {4'b0000, writedata};
  assign wren         = wr && (address == 6'd2);
  assign gen_done     = reg_done[0];

  // a bus master never reads and writes in the same cycle
  assert property (@(posedge clk) disable iff (rst) !(rd && wr));

endmodule
