// div_pipe: pipelined unsigned divider with a fixed latency.
//
// Computes quo = num / den (integer quotient) for one operand pair per clock.
// It is a restoring divider unrolled into NUM_W registered stages, one per
// quotient bit from the most significant down: each stage shifts the next
// numerator bit into the partial remainder and subtracts the divisor when it
// fits. Extra register stages pad the total delay to LATENCY clocks, the
// latency of the division core used in the direction calculation (39).
// Division by zero gives an all-ones quotient (every subtraction "fits").
// A TAG_W-bit tag travels through the pipeline with each operand pair so that
// data belonging to the division leaves it in step with the quotient.
//
// Interface: in_valid with num/den/tag_in; LATENCY clocks later out_valid
// with quo and tag_out. Fully pipelined, no stalls.
//
// Only the 39-clock latency comes from the design this follows, which used a
// vendor division core; the restoring structure, the tag and the divide-by-zero
// result are choices of this implementation.
module div_pipe #(
  parameter int NUM_W   = 26,
  parameter int DEN_W   = 18,
  parameter int TAG_W   = 21,
  parameter int LATENCY = 39
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output logic [NUM_W-1:0] quo,
  output logic [TAG_W-1:0] tag_out
);

  localparam int PAD = LATENCY - NUM_W;

  // Stage s holds the state after s quotient bits have been decided.
  logic             s_vld [NUM_W+1];
  logic [NUM_W-1:0] s_num [NUM_W+1];   // numerator bits still to be shifted in (MSB first)
  logic [DEN_W-1:0] s_den [NUM_W+1];
  logic [DEN_W-1:0] s_rem [NUM_W+1];
  logic [NUM_W-1:0] s_quo [NUM_W+1];
  logic [TAG_W-1:0] s_tag [NUM_W+1];

  always_comb begin
    s_vld[0] = in_valid;
    s_num[0] = num;
    s_den[0] = den;
    s_rem[0] = '0;
    s_quo[0] = '0;
    s_tag[0] = tag_in;
  end

  for (genvar s = 0; s < NUM_W; s++) begin : g_stage
    logic [DEN_W:0] trial;
    logic           fits;
    always_comb begin
      trial = {s_rem[s], s_num[s][NUM_W-1]};
      fits  = (trial >= {1'b0, s_den[s]});
    end
    always_ff @(posedge clk) begin
      s_num[s+1] <= s_num[s] << 1;
      s_den[s+1] <= s_den[s];
      s_rem[s+1] <= fits ? DEN_W'(trial - {1'b0, s_den[s]}) : DEN_W'(trial);
      s_quo[s+1] <= {s_quo[s][NUM_W-2:0], fits};
      s_tag[s+1] <= s_tag[s];
    end
    always_ff @(posedge clk) begin
      if (rst) s_vld[s+1] <= 1'b0;
      else     s_vld[s+1] <= s_vld[s];
    end
  end

  if (PAD > 0) begin : g_pad
    logic             p_vld [PAD];
    logic [NUM_W-1:0] p_quo [PAD];
    logic [TAG_W-1:0] p_tag [PAD];
    always_ff @(posedge clk) begin
      p_quo[0] <= s_quo[NUM_W];
      p_tag[0] <= s_tag[NUM_W];
      for (int i = 1; i < PAD; i++) begin
        p_quo[i] <= p_quo[i-1];
        p_tag[i] <= p_tag[i-1];
      end
    end
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < PAD; i++) p_vld[i] <= 1'b0;
      end else begin
        p_vld[0] <= s_vld[NUM_W];
        for (int i = 1; i < PAD; i++) p_vld[i] <= p_vld[i-1];
      end
    end
    assign out_valid = p_vld[PAD-1];
    assign quo       = p_quo[PAD-1];
    assign tag_out   = p_tag[PAD-1];
  end else begin : g_nopad
    assign out_valid = s_vld[NUM_W];
    assign quo       = s_quo[NUM_W];
    assign tag_out   = s_tag[NUM_W];
  end

  initial begin
    if (LATENCY < NUM_W) $error("div_pipe: LATENCY must be at least NUM_W");
  end

endmodule
