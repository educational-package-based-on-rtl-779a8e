// pc_register: the program counter with the host "set next address"
// feature. On reset the PC becomes 0. When the processor advances (`en`)
// the PC loads the next address the datapath computed, unless the host has
// set a next address, in which case that address is loaded instead and the
// request is consumed. `pc_next` shows the address the PC will take at its
// next update (the host's value while one is pending), so a user can read
// both the current and the next address. The host-set feature follows the
// program-counter section; the pending-request register is this design's
// way of holding the value until the processor next runs.
module pc_register (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] next_dp,     // next PC computed by the datapath
  input  logic        host_set,
  input  logic [31:0] host_val,
  output logic [31:0] pc,
  output logic [31:0] pc_next
);
  logic        pending;
  logic [31:0] pend_val;

  assign pc_next = pending ? pend_val : next_dp;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= '0;
      pending  <= 1'b0;
      pend_val <= '0;
    end else begin
      if (en) begin
        pc      <= pc_next;
        pending <= 1'b0;
      end
      if (host_set) begin
        pending  <= 1'b1;
        pend_val <= host_val;
      end
    end
  end
endmodule
