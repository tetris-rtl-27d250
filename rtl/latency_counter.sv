// latency_counter: on-chip measurement of input-to-display latency.
//
// A valid input (start) begins a count of clock cycles. The count ends at
// the start of the vertical sync pulse that closes the first frame whose
// visible area began after the input, i.e. the first frame that can show
// the result in full. `last` holds the latest measurement, `worst` the
// largest since reset, `count` the number of measurements; `done` pulses
// when one ends. An input while a measurement runs is ignored. The end
// point is this design's reading of measuring "to the next vertical sync
// pulse".
module latency_counter #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         frame_start,  // first visible pixel of a frame
  input  logic         vsync_start,  // first cycle of a vsync pulse
  output logic [W-1:0] last,
  output logic [W-1:0] worst,
  output logic [15:0]  count,
  output logic         done
);
  typedef enum logic [1:0] {L_IDLE, L_WAIT_FRAME, L_WAIT_VSYNC} lat_t;
  lat_t st;
  logic [W-1:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; cyc <= '0; last <= '0; worst <= '0; count <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != L_IDLE && cyc != '1) cyc <= cyc + 1'b1;
      unique case (st)
        L_IDLE:       if (start) begin st <= L_WAIT_FRAME; cyc <= W'(1); end
        L_WAIT_FRAME: if (frame_start) st <= L_WAIT_VSYNC;
        default:
          if (vsync_start) begin
            st    <= L_IDLE;
            last  <= cyc;
            if (cyc > worst) worst <= cyc;
            count <= count + 16'd1;
            done  <= 1'b1;
          end
      endcase
    end
  end
endmodule
