// traceback_unit: traceback over a stored frame of decisions, and output of
// the decoded bits in their original order.
//
// When start is pulsed (the last trellis stage of a frame has been written),
// the unit begins at state 0 in the final stage, as the design description
// prescribes for a terminated trellis, and walks back one stage per clock: the
// input bit that led into state s is s's MSB, and the predecessor is
// {s[K-3:0], d}, where d is s's decision bit read from the survivor memory.
// The memory has one cycle of read latency, so the walk over FRAME_LEN stages
// takes FRAME_LEN+1 cycles; busy is high during it and the memory address
// (rd_addr) belongs to this unit only then.
// The bits come out last-first, so they are collected in a register and then
// streamed out first-first on z/z_valid, one per clock, DATA_LEN = FRAME_LEN-(K-1)
// bits (the tail bits are dropped). Streaming overlaps the next frame's
// add-compare-select phase. The collecting register and the streaming are own
// choices.
// The description expects the path to end at state 0 at the beginning of the
// frame as well; path_ok, valid with the frame_done pulse, reports whether the
// state reached after the first stage is 0 (a check only, the bits are output
// either way).
module traceback_unit #(
  parameter int unsigned K         = 9,
  parameter int unsigned FRAME_LEN = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic [$clog2(FRAME_LEN)-1:0] rd_addr,
  input  logic [2**(K-1)-1:0]          rd_data,
  output logic                         z_valid,
  output logic                         z,
  output logic                         frame_done,
  output logic                         path_ok
);
  localparam int unsigned DATA_LEN = FRAME_LEN - (K - 1);
  localparam int unsigned AW       = $clog2(FRAME_LEN);

  logic [K-2:0]          state;
  logic [AW-1:0]         data_stage;
  logic                  data_vld;
  logic                  issuing;
  logic [FRAME_LEN-1:0]  dec;
  logic                  out_active;
  logic [AW-1:0]         out_cnt;
  logic [K-2:0]          pred;

  assign pred = {state[K-3:0], rd_data[state]};

  assign z       = dec[out_cnt];
  assign z_valid = out_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      issuing    <= 1'b0;
      rd_addr    <= '0;
      data_stage <= '0;
      data_vld   <= 1'b0;
      state      <= '0;
      dec        <= '0;
      out_active <= 1'b0;
      out_cnt    <= '0;
      frame_done <= 1'b0;
      path_ok    <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      path_ok    <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        issuing  <= 1'b1;
        rd_addr  <= AW'(FRAME_LEN - 1);
        data_vld <= 1'b0;
        state    <= '0;
      end else if (busy) begin
        // Address side: one stage per clock, last to first.
        data_vld   <= issuing;
        data_stage <= rd_addr;
        if (issuing) begin
          if (rd_addr == '0) issuing <= 1'b0;
          else               rd_addr <= rd_addr - 1'b1;
        end
        // Data side: one step back through the trellis.
        if (data_vld) begin
          dec[data_stage] <= state[K-2];
          state           <= pred;
          if (data_stage == '0) begin
            path_ok    <= (pred == '0);
            busy       <= 1'b0;
            out_active <= 1'b1;
            out_cnt    <= '0;
            frame_done <= 1'b1;
          end
        end
      end
      // Output side: decoded data bits, first bit first.
      if (out_active) begin
        if (out_cnt == AW'(DATA_LEN - 1)) out_active <= 1'b0;
        else                              out_cnt    <= out_cnt + 1'b1;
      end
    end
  end

  // A new traceback must not overwrite bits that are still being streamed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !busy) |-> !out_active);

endmodule
