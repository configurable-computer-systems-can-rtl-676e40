// block_ram: the dual-port 512 x 36 block RAM between the host and the
// main-controller.
//
// Port A belongs to the host (through the board's local bus), port B to the
// main-controller. Each port has an enable, a write enable, an address and
// 32-bit write and read data. Of the 36 stored bits, 32 are data and 4 are
// even parity, one per byte, computed on write and returned on read (dopa,
// dopb). Both ports are synchronous: the read data of an address given with
// the enable high appears after the next clock edge; a write also shows the
// new word on its own port (write-first). Simultaneous writes to one address
// from both ports are not allowed.
// The size and the 32 + 4 split follow the document; the FPGA's vendor RAM is
// replaced by this array, and the parity rule and write-first behaviour are
// this design's choices.
module block_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 36
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic                     wea,
  input  logic [$clog2(DEPTH)-1:0] addra,
  input  logic [31:0]              dia,
  output logic [31:0]              doa,
  output logic [3:0]               dopa,
  input  logic                     enb,
  input  logic                     web,
  input  logic [$clog2(DEPTH)-1:0] addrb,
  input  logic [31:0]              dib,
  output logic [31:0]              dob,
  output logic [3:0]               dopb
);
  logic [WIDTH-1:0] mem [DEPTH];

  function automatic logic [WIDTH-1:0] with_parity(logic [31:0] d);
    return {^d[31:24], ^d[23:16], ^d[15:8], ^d[7:0], d};
  endfunction

  always_ff @(posedge clk) begin
    if (ena) begin
      if (wea) begin
        mem[addra]  <= with_parity(dia);
        {dopa, doa} <= with_parity(dia);
      end else
        {dopa, doa} <= mem[addra];
    end
    if (enb) begin
      if (web) begin
        mem[addrb]  <= with_parity(dib);
        {dopb, dob} <= with_parity(dib);
      end else
        {dopb, dob} <= mem[addrb];
    end
  end
endmodule
