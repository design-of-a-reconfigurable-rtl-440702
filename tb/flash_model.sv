// flash_model: behavioural model of the flash memory controller and the
// flash memory behind it, for simulation only.
//
// Commands are one-clock pulses of erase_in, write_in or read_in with
// address_in (and data_in for a write). After LATENCY clocks done_out is
// high for one clock; for a read, data_out holds the byte from then on.
// Like a real flash, erasing sets a byte to FF and writing can only clear
// bits (the stored byte becomes old AND new), so a write without an erase
// before it is detected and counted in bad_writes. Memory starts at 00.
module flash_model #(
  parameter int SIZE    = 65536,
  parameter int LATENCY = 3
) (
  input  logic        clk,
  input  logic [21:0] address_in,
  input  logic [7:0]  data_in,
  input  logic        erase_in,
  input  logic        write_in,
  input  logic        read_in,
  output logic [7:0]  data_out,
  output logic        done_out
);
  logic [7:0] mem [SIZE];
  int erases = 0, writes = 0, reads = 0, bad_writes = 0, busy = 0;

  initial begin
    for (int i = 0; i < SIZE; i++) mem[i] = 8'h00;
    data_out = '0;
    done_out = 1'b0;
  end

  always @(posedge clk) begin
    done_out <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) done_out <= 1'b1;
    end
    if (erase_in || write_in || read_in) begin
      int a;
      a = int'(address_in) % SIZE;
      busy <= LATENCY;
      if (erase_in) begin mem[a] <= 8'hFF; erases++; end
      if (write_in) begin
        if (mem[a] != 8'hFF) bad_writes++;
        mem[a] <= mem[a] & data_in;
        writes++;
      end
      if (read_in) begin data_out <= mem[a]; reads++; end
    end
  end
endmodule
