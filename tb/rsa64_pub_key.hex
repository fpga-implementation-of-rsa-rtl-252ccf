c44a92944d3087f3
49b64a0872e6cc3d
