c44a92944d3087f3
0768fd85062dada5
