// delay_queue: in-order queue that holds every entry for at least LATENCY cycles.
//
// Models a fixed-latency link of the memory pipe (interconnect to L2, L2 to the DRAM
// scheduler). Each entry is stored with the cycle it entered; the head may leave once
// LATENCY cycles have passed, so order is kept and a steady stream passes at one entry
// per cycle as long as DEPTH covers the latency. Interface and handshakes as sync_fifo.
// With LATENCY = 0 an entry can leave the cycle after it entered.
module delay_queue #(
  parameter int WIDTH   = 8,
  parameter int DEPTH   = 4,
  parameter int LATENCY = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int TW = 16;

  logic [TW-1:0]       now;
  logic [WIDTH+TW-1:0] head;
  logic                fifo_valid;
  logic [TW-1:0]       age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  sync_fifo #(.WIDTH(WIDTH + TW), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data({in_data, now}),
    .out_valid(fifo_valid), .out_ready(out_ready && out_valid), .out_data(head),
    .count()
  );

  assign age       = now - head[TW-1:0];
  assign out_valid = fifo_valid && (age >= TW'(LATENCY));
  assign out_data  = head[WIDTH+TW-1:TW];
endmodule
