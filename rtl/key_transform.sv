// key_transform - key transformation scheme in front of a locked generator:
// it turns the primary key presented on the chip's key pins into the
// transformed key that drives the generator's key inputs.
//
// The scheme is built as a substitution box held in a key memory: a table of
// 2**PK_W words of TK_W bits, indexed by the primary key. The table is
// written after fabrication (prog_we / prog_addr / prog_data) and then
// closed with lock_req; from then on writes are ignored, so the mapping
// cannot be changed. Only a correct primary key selects the entry holding the
// working generator key; any other key selects some other generator.
//
// The source gives the role of this block (a protected memory, filled at the
// last production step, that maps a primary key to the transformed key, for
// instance with a substitution box) but not its insides. The table, the
// programming port, the lock and the behaviour before locking are this
// design's own choices. Tamper protection of the memory is physical and is
// not modelled. The lock is held in a flip-flop cleared by rst_n, standing in
// for a one-time fuse.
//
// Interface and timing:
//   prog_we,prog_addr,prog_data  table write, one word per clock, only while
//                                unlocked
//   lock_req                     closes the table (sticky until rst_n)
//   locked                       table closed, transformed key valid
//   primary_key                  key pins
//   transformed_key              registered: table[primary_key] one clock
//                                after primary_key, all-zeros while unlocked
module key_transform #(
  parameter int unsigned PK_W = 9,
  parameter int unsigned TK_W = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [PK_W-1:0] prog_addr,
  input  logic [TK_W-1:0] prog_data,
  input  logic            lock_req,
  output logic            locked,
  input  logic [PK_W-1:0] primary_key,
  output logic [TK_W-1:0] transformed_key
);

  logic [TK_W-1:0] sbox [2**PK_W];

  always_ff @(posedge clk) begin
    if (prog_we && !locked)
      sbox[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked          <= 1'b0;
      transformed_key <= '0;
    end else begin
      if (lock_req)
        locked <= 1'b1;
      transformed_key <= locked ? sbox[primary_key] : '0;
    end
  end

  // Once closed, the table stays closed until reset.
  a_lock_sticky: assert property (@(posedge clk) disable iff (!rst_n) locked |=> locked);

endmodule
